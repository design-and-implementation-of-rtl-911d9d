// system_controller: routes the smart packets of one CPN router.
//
// It serves the input port controllers that hold a smart packet (lowest
// port first) and picks one of three cases from the packet's destination:
//  * destination is this router: the packet has arrived. An acknowledgment
//    is built from it, with source and destination swapped and the
//    cognitive map (CM) reversed, and sent to the first hop of that
//    reversed route. 'ev_arrived' pulses.
//  * destination is a neighbour and that link is up: forward to it
//    directly, without the SPP ('ev_direct').
//  * otherwise (or the neighbour's link is down): apply QSD and incoming
//    port to the SPP, wait for its output port ('ev_spp').
// Before a smart packet is forwarded the CM gets one entry: the address of
// the next hop and the reward of that link (link_reward, set from outside).
// The packet is then handed to the output port controller, waiting until
// it is granted. A packet whose CM is full, or an acknowledgment with no
// neighbour for its first hop, is dropped ('ev_drop').
// The state sequence follows the reference state diagram of the system
// controller; the CM layout, the drop rule and the port priority are this
// design's choices.
module system_controller
  import cpn_pkg::*;
#(
  parameter int N = N_PORTS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [ADDR_W-1:0]       my_addr,
  input  logic [N-1:0][ADDR_W-1:0] neighbor_addr,
  input  logic [N-1:0]            link_up,
  input  logic [N-1:0][P_W-1:0]   link_reward,
  // input port controllers
  input  logic [N-1:0]            ipc_has_smart,
  input  packet_t [N-1:0]         ipc_pkt,
  output logic [N-1:0]            ipc_take,
  // SPP smart packet interface
  output logic                    start_sp,
  output qsd_t                    qsd_sp,
  output port_t                   inc_port_sp,
  input  logic                    done_sp,
  input  port_t                   out_port_sp,
  // output port controllers
  output logic                    opc_req,
  output port_t                   opc_port,
  output packet_t                 opc_pkt,
  input  logic                    opc_grant,
  // events
  output logic                    ev_arrived,
  output logic                    ev_direct,
  output logic                    ev_spp,
  output logic                    ev_drop
);
  typedef enum logic [3:0] {
    S_INIT, S_WAIT_IPC, S_RECEIVE, S_VERIFY, S_APPLY_SPI, S_WAIT_SPI,
    S_RECV_PORT, S_UPDATE_CM, S_GEN_ACK_QSD, S_GEN_ACK_CM, S_REQ_OPC, S_FORWARD
  } state_t;

  state_t    state;
  packet_t   pkt;
  port_t     inc, out;
  logic      nb_hit;
  port_t     nb_port;
  logic      first_hit;
  port_t     first_port;

  // Serve the lowest-numbered input port holding a smart packet.
  logic  any_req;
  port_t req_port;
  always_comb begin
    any_req  = 1'b0;
    req_port = '0;
    for (int i = N-1; i >= 0; i--)
      if (ipc_has_smart[i]) begin any_req = 1'b1; req_port = port_t'(i); end
  end

  // Is the destination a neighbour? Which port leads to the ACK's first hop?
  always_comb begin
    nb_hit = 1'b0; nb_port = '0;
    first_hit = 1'b0; first_port = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (neighbor_addr[i] == pkt.qsd.dst) begin nb_hit = 1'b1; nb_port = port_t'(i); end
      if (neighbor_addr[i] == pkt.cm[1].addr) begin first_hit = 1'b1; first_port = port_t'(i); end
    end
  end

  assign start_sp    = (state == S_APPLY_SPI);
  assign qsd_sp      = pkt.qsd;
  assign inc_port_sp = inc;
  assign opc_req     = (state == S_REQ_OPC);
  assign opc_port    = out;
  assign opc_pkt     = pkt;

  always_comb begin
    ipc_take = '0;
    if (state == S_WAIT_IPC && any_req) ipc_take[req_port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      pkt        <= '0;
      inc        <= '0;
      out        <= '0;
      ev_arrived <= 1'b0;
      ev_direct  <= 1'b0;
      ev_spp     <= 1'b0;
      ev_drop    <= 1'b0;
    end else begin
      ev_arrived <= 1'b0;
      ev_direct  <= 1'b0;
      ev_spp     <= 1'b0;
      ev_drop    <= 1'b0;
      unique case (state)
        S_INIT: state <= S_WAIT_IPC;
        S_WAIT_IPC: if (any_req) begin
          pkt   <= ipc_pkt[req_port];
          inc   <= req_port;
          state <= S_RECEIVE;
        end
        S_RECEIVE: begin
          if (pkt.qsd.dst == my_addr) state <= S_GEN_ACK_QSD;
          else if (nb_hit)            state <= S_VERIFY;
          else                        state <= S_APPLY_SPI;
        end
        S_VERIFY: begin
          if (link_up[nb_port]) begin
            out       <= nb_port;
            ev_direct <= 1'b1;
            state     <= S_UPDATE_CM;
          end else begin
            state <= S_APPLY_SPI;
          end
        end
        S_APPLY_SPI: begin
          ev_spp <= 1'b1;
          state  <= S_WAIT_SPI;
        end
        S_WAIT_SPI: if (done_sp) begin
          out   <= out_port_sp;
          state <= S_RECV_PORT;
        end
        S_RECV_PORT: state <= S_UPDATE_CM;
        S_UPDATE_CM: begin
          if (pkt.len >= LEN_W'(CM_DEPTH)) begin
            ev_drop <= 1'b1;
            state   <= S_WAIT_IPC;
          end else begin
            pkt.cm[pkt.len[$clog2(CM_DEPTH)-1:0]] <= '{addr: neighbor_addr[out], reward: link_reward[out]};
            pkt.len <= pkt.len + 1'b1;
            state   <= S_REQ_OPC;
          end
        end
        S_GEN_ACK_QSD: begin
          ev_arrived  <= 1'b1;
          pkt.ptype   <= PKT_ACK;
          pkt.qsd.src <= pkt.qsd.dst;
          pkt.qsd.dst <= pkt.qsd.src;
          for (int i = 0; i < CM_DEPTH; i++)
            if (LEN_W'(i) < pkt.len) pkt.cm[i] <= pkt.cm[pkt.len - 1 - LEN_W'(i)];
          state <= S_GEN_ACK_CM;
        end
        S_GEN_ACK_CM: begin
          if (first_hit && pkt.len > LEN_W'(1)) begin
            out   <= first_port;
            state <= S_REQ_OPC;
          end else begin
            ev_drop <= 1'b1;
            state   <= S_WAIT_IPC;
          end
        end
        S_REQ_OPC: if (opc_grant) state <= S_FORWARD;
        S_FORWARD: state <= S_WAIT_IPC;
        default:   state <= S_WAIT_IPC;
      endcase
    end
  end
endmodule
