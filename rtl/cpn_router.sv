// cpn_router: a basic cognitive packet network router built around the
// smart packet processor.
//
// Each of the N ports has an input port controller and an output port
// controller; together they make a duplex link to a neighbouring router.
// Smart packets go to the system controller, which routes them itself
// (arrived here, or next to a connected neighbour) or asks the SPP for the
// output port. Acknowledgments go to the mailbox, which feeds their reward
// to the SPP's learning side and forwards them along the reversed route.
// The SPP serves smart packets while it learns.
//
// Interface: my_addr and neighbor_addr[] give this router's address and
// those of its neighbours (routers know their neighbours); link_up[] and
// link_reward[] are the state and the reward of each outgoing link, set
// from outside so that congestion and broken links can be simulated. The
// links are parallel packet words with valid/ready handshakes. The ev_*
// outputs pulse once per event for monitoring (ev_rewarded, ev_punished
// and ev_model_hit at the end of a learning update).
// Composition (input and output port controllers, system controller,
// mailbox, SPP) follows the reference router; packet format and link
// handshake are this design's choices.
module cpn_router
  import cpn_pkg::*;
#(
  parameter int N = N_PORTS,
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADDR_W-1:0]        my_addr,
  input  logic [N-1:0][ADDR_W-1:0] neighbor_addr,
  input  logic [N-1:0]             link_up,
  input  logic [N-1:0][P_W-1:0]    link_reward,
  // links in
  input  logic [N-1:0]             in_valid,
  input  packet_t [N-1:0]          in_pkt,
  output logic [N-1:0]             in_ready,
  // links out
  output logic [N-1:0]             out_valid,
  output packet_t [N-1:0]          out_pkt,
  input  logic [N-1:0]             out_ready,
  // events
  output logic                     ev_arrived,
  output logic                     ev_direct,
  output logic                     ev_spp,
  output logic                     ev_learn,
  output logic                     ev_rewarded,
  output logic                     ev_punished,
  output logic                     ev_model_hit,
  output logic                     ev_delivered,
  output logic                     ev_drop
);
  logic [N-1:0]    has_smart, has_ack, take_sc, take_mb;
  packet_t [N-1:0] ipc_pkt;

  logic    sc_req, sc_grant, mb_req, mb_grant;
  port_t   sc_port, mb_port;
  packet_t sc_pkt, mb_pkt;
  logic [N-1:0] g_sc, g_mb;

  logic  start_sp, done_sp, start_ack, done_ack, ack_rewarded, ack_hit;
  qsd_t  qsd_sp, qsd_ack;
  port_t inc_port_sp, out_port_sp, inc_port_ack;
  logic [P_W-1:0] rew_val;
  logic  sc_drop, mb_drop;

  for (genvar i = 0; i < N; i++) begin : g_port
    input_port_ctrl u_ipc (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_pkt(in_pkt[i]), .in_ready(in_ready[i]),
      .has_smart(has_smart[i]), .has_ack(has_ack[i]), .pkt(ipc_pkt[i]),
      .take(take_sc[i] | take_mb[i])
    );
    output_port_ctrl u_opc (
      .clk, .rst_n,
      .req_sc(sc_req && sc_port == port_t'(i)), .pkt_sc(sc_pkt), .grant_sc(g_sc[i]),
      .req_mb(mb_req && mb_port == port_t'(i)), .pkt_mb(mb_pkt), .grant_mb(g_mb[i]),
      .out_valid(out_valid[i]), .out_pkt(out_pkt[i]), .out_ready(out_ready[i])
    );
  end
  assign sc_grant = |g_sc;
  assign mb_grant = |g_mb;

  system_controller #(.N(N)) u_sc (
    .clk, .rst_n, .my_addr, .neighbor_addr, .link_up, .link_reward,
    .ipc_has_smart(has_smart), .ipc_pkt, .ipc_take(take_sc),
    .start_sp, .qsd_sp, .inc_port_sp, .done_sp, .out_port_sp,
    .opc_req(sc_req), .opc_port(sc_port), .opc_pkt(sc_pkt), .opc_grant(sc_grant),
    .ev_arrived, .ev_direct, .ev_spp, .ev_drop(sc_drop)
  );

  ack_mailbox #(.N(N)) u_mb (
    .clk, .rst_n, .my_addr, .neighbor_addr,
    .ipc_has_ack(has_ack), .ipc_pkt, .ipc_take(take_mb),
    .start_ack, .qsd_ack, .inc_port_ack, .rew_val, .done_ack,
    .opc_req(mb_req), .opc_port(mb_port), .opc_pkt(mb_pkt), .opc_grant(mb_grant),
    .ev_learn, .ev_delivered, .ev_drop(mb_drop)
  );

  spp #(.N(N), .LFSR_SEED(LFSR_SEED)) u_spp (
    .clk, .rst_n, .link_up,
    .start_sp, .qsd_sp, .inc_port_sp, .done_sp, .out_port_sp,
    .start_ack, .qsd_ack, .inc_port_ack, .rew_val, .done_ack,
    .ack_rewarded, .ack_hit
  );

  assign ev_drop      = sc_drop | mb_drop;
  assign ev_rewarded  = done_ack && ack_rewarded;
  assign ev_punished  = done_ack && !ack_rewarded;
  assign ev_model_hit = done_ack && ack_hit;
endmodule
