// Testbench for system_controller at router 3 (neighbours 1, 2, 4, 5 on
// ports 0..3). The SPP and the output port controllers are modelled here.
// Cases: route through the SPP (CM gets next hop and link reward); direct
// forward to a connected neighbour; SPP when that neighbour's link is down;
// arrival (acknowledgment with swapped QSD and reversed CM to the first
// hop); a full CM (dropped).
module tb_system_controller;
  import cpn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][ADDR_W-1:0] nbr;
  logic [N-1:0] link_up, has_smart, take;
  logic [N-1:0][P_W-1:0] lrew;
  packet_t [N-1:0] ipc_pkt;
  logic start_sp, done_sp, opc_req, opc_grant, ev_arrived, ev_direct, ev_spp, ev_drop;
  qsd_t qsd_sp; port_t inc_port_sp, out_port_sp, opc_port;
  packet_t opc_pkt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  system_controller dut (.clk, .rst_n, .my_addr(32'd3), .neighbor_addr(nbr), .link_up,
    .link_reward(lrew), .ipc_has_smart(has_smart), .ipc_pkt, .ipc_take(take),
    .start_sp, .qsd_sp, .inc_port_sp, .done_sp, .out_port_sp,
    .opc_req, .opc_port, .opc_pkt, .opc_grant, .ev_arrived, .ev_direct, .ev_spp, .ev_drop);

  // SPP model: answers port 2 after 4 cycles; counts requests
  int spp_calls = 0; port_t spp_inc;
  logic [3:0] sp_cnt;
  always_ff @(posedge clk) begin
    done_sp <= 1'b0;
    if (start_sp) begin sp_cnt <= 4; spp_calls++; spp_inc <= inc_port_sp; end
    else if (sp_cnt != 0) begin sp_cnt <= sp_cnt - 1; if (sp_cnt == 1) done_sp <= 1'b1; end
  end
  assign out_port_sp = 2'd2;
  // OPC model: grants after two cycles of request
  int req_cycles = 0;
  always_ff @(posedge clk) req_cycles <= opc_req ? req_cycles + 1 : 0;
  assign opc_grant = opc_req && req_cycles >= 2;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // deliver a packet on port 'p', wait for the OPC hand-off or a drop
  task automatic serve(input packet_t pk, input port_t p, output packet_t sent,
                       output port_t port, output logic dropped);
    ipc_pkt[p] = pk; has_smart[p] = 1;
    dropped = 0;
    for (int c = 0; c < 100; c++) begin
      @(posedge clk);
      if (take[p]) has_smart[p] <= 0;
      if (ev_drop) begin dropped = 1; break; end
      if (opc_grant) begin sent = opc_pkt; port = opc_port; break; end
    end
    repeat (3) @(negedge clk);
  endtask

  function automatic packet_t smart(int dst, int hops);
    packet_t k = '0;
    k.ptype = PKT_SMART; k.qsd = '{qos: 1, src: 8, dst: 32'(dst)};
    k.len = LEN_W'(hops);
    for (int i = 0; i < hops; i++) k.cm[i] = '{addr: 32'(40 + i), reward: 16'(i)};
    k.cm[hops-1].addr = 3;
    return k;
  endfunction

  packet_t s, k; port_t op; logic dr; int calls;
  initial begin
    nbr = {32'd5, 32'd4, 32'd2, 32'd1};
    lrew = {16'h0500, 16'h0400, 16'h0300, 16'h0100};
    link_up = '1; has_smart = '0; ipc_pkt = '0;
    repeat (2) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    // 1. destination 9 (not a neighbour): through the SPP, arrived on port 1
    k = smart(9, 2); calls = spp_calls;
    serve(k, 1, s, op, dr);
    chk(!dr && spp_calls == calls + 1 && spp_inc == 1, "SPP asked with incoming port");
    chk(op == 2 && s.len == 3 && s.cm[2].addr == 4 && s.cm[2].reward == 16'h0400, "CM appended with hop and reward");
    chk(s.cm[0] == k.cm[0] && s.cm[1] == k.cm[1] && s.qsd == k.qsd && s.ptype == PKT_SMART, "rest unchanged");
    // 2. destination 5, link up: direct on port 3, no SPP
    calls = spp_calls;
    serve(smart(5, 2), 0, s, op, dr);
    chk(!dr && op == 3 && spp_calls == calls && s.cm[2].addr == 5 && s.cm[2].reward == 16'h0500, "direct forward");
    // 3. destination 5, link down: SPP
    link_up[3] = 0; calls = spp_calls;
    serve(smart(5, 2), 0, s, op, dr);
    chk(!dr && spp_calls == calls + 1 && op == 2, "SPP when neighbour link is down");
    link_up[3] = 1;
    // 4. destination is this router: acknowledgment
    k = smart(3, 4); k.cm[2].addr = 2;   // route 40 41 2 3
    serve(k, 1, s, op, dr);
    chk(!dr && s.ptype == PKT_ACK && s.qsd.src == 3 && s.qsd.dst == 8 && s.qsd.qos == 1, "ACK QSD");
    chk(s.len == 4 && s.cm[0] == k.cm[3] && s.cm[1] == k.cm[2] && s.cm[2] == k.cm[1] && s.cm[3] == k.cm[0], "ACK CM reversed");
    chk(op == 1, "ACK to its first hop (router 2, port 1)");
    // 5. full CM: dropped
    serve(smart(5, CM_DEPTH), 2, s, op, dr);
    chk(dr, "full CM dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
