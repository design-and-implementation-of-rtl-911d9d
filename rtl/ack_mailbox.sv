// ack_mailbox: acknowledgment handling of one CPN router.
//
// It serves the input port controllers that hold an acknowledgment (lowest
// port first). It finds this router's address in the acknowledgment's
// cognitive map; the entry before it is the hop the smart packet took from
// here, and its reward is the reward of that decision. The reward, the port
// the acknowledgment came in on (the smart packet's output port) and the
// QSD with source and destination swapped back are applied to the SPP's
// learning side, and the mailbox waits for it to finish. Then the entry
// after this router gives the next hop; the packet is handed to the output
// port controller leading there. If this router is the last entry, the
// smart packet started here and the acknowledgment is consumed
// ('ev_delivered'). An acknowledgment that does not list this router, or
// whose next hop is no neighbour, is dropped ('ev_drop'). The state
// sequence follows the reference state diagram of the mailbox; which CM
// entry carries the reward is this design's choice.
module ack_mailbox
  import cpn_pkg::*;
#(
  parameter int N = N_PORTS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        my_addr,
  input  logic [N-1:0][ADDR_W-1:0] neighbor_addr,
  // input port controllers
  input  logic [N-1:0]             ipc_has_ack,
  input  packet_t [N-1:0]          ipc_pkt,
  output logic [N-1:0]             ipc_take,
  // SPP learning interface
  output logic                     start_ack,
  output qsd_t                     qsd_ack,
  output port_t                    inc_port_ack,
  output logic [P_W-1:0]           rew_val,
  input  logic                     done_ack,
  // output port controllers
  output logic                     opc_req,
  output port_t                    opc_port,
  output packet_t                  opc_pkt,
  input  logic                     opc_grant,
  // events
  output logic                     ev_learn,
  output logic                     ev_delivered,
  output logic                     ev_drop
);
  localparam int IW = $clog2(CM_DEPTH);
  typedef enum logic [2:0] {
    S_INIT, S_CHECK_IPC, S_RECEIVE, S_APPLY_RL, S_WAIT_RL, S_PARSE_CM,
    S_REQ_OPC, S_FORWARD
  } state_t;

  state_t          state;
  packet_t         pkt;
  port_t           inc, out;
  logic [IW-1:0]   me;
  logic [P_W-1:0]  reward;

  logic  any_req;
  port_t req_port;
  always_comb begin
    any_req  = 1'b0;
    req_port = '0;
    for (int i = N-1; i >= 0; i--)
      if (ipc_has_ack[i]) begin any_req = 1'b1; req_port = port_t'(i); end
  end

  // This router's position in the CM.
  logic          found;
  logic [IW-1:0] pos;
  always_comb begin
    found = 1'b0; pos = '0;
    for (int i = CM_DEPTH-1; i >= 0; i--)
      if (LEN_W'(i) < pkt.len && pkt.cm[i].addr == my_addr) begin found = 1'b1; pos = IW'(i); end
  end

  // Port towards the next hop.
  logic  nh_hit;
  port_t nh_port;
  logic [ADDR_W-1:0] next_addr;
  assign next_addr = pkt.cm[IW'(me + 1'b1)].addr;
  always_comb begin
    nh_hit = 1'b0; nh_port = '0;
    for (int i = N-1; i >= 0; i--)
      if (neighbor_addr[i] == next_addr) begin nh_hit = 1'b1; nh_port = port_t'(i); end
  end

  assign start_ack    = (state == S_APPLY_RL);
  assign qsd_ack      = '{qos: pkt.qsd.qos, src: pkt.qsd.dst, dst: pkt.qsd.src};
  assign inc_port_ack = inc;
  assign rew_val      = reward;
  assign opc_req      = (state == S_REQ_OPC);
  assign opc_port     = out;
  assign opc_pkt      = pkt;

  always_comb begin
    ipc_take = '0;
    if (state == S_CHECK_IPC && any_req) ipc_take[req_port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      pkt          <= '0;
      inc          <= '0;
      out          <= '0;
      me           <= '0;
      reward       <= '0;
      ev_learn     <= 1'b0;
      ev_delivered <= 1'b0;
      ev_drop      <= 1'b0;
    end else begin
      ev_learn     <= 1'b0;
      ev_delivered <= 1'b0;
      ev_drop      <= 1'b0;
      unique case (state)
        S_INIT: state <= S_CHECK_IPC;
        S_CHECK_IPC: if (any_req) begin
          pkt   <= ipc_pkt[req_port];
          inc   <= req_port;
          state <= S_RECEIVE;
        end
        S_RECEIVE: begin
          if (found && pos != '0) begin
            me     <= pos;
            reward <= pkt.cm[pos - 1'b1].reward;
            state  <= S_APPLY_RL;
          end else begin
            ev_drop <= 1'b1;
            state   <= S_CHECK_IPC;
          end
        end
        S_APPLY_RL: begin
          ev_learn <= 1'b1;
          state    <= S_WAIT_RL;
        end
        S_WAIT_RL: if (done_ack) state <= S_PARSE_CM;
        S_PARSE_CM: begin
          if (LEN_W'(me) + 1 >= pkt.len) begin
            ev_delivered <= 1'b1;
            state        <= S_CHECK_IPC;
          end else if (nh_hit) begin
            out   <= nh_port;
            state <= S_REQ_OPC;
          end else begin
            ev_drop <= 1'b1;
            state   <= S_CHECK_IPC;
          end
        end
        S_REQ_OPC: if (opc_grant) state <= S_FORWARD;
        S_FORWARD: state <= S_CHECK_IPC;
        default:   state <= S_CHECK_IPC;
      endcase
    end
  end
endmodule
