// Testbench for ack_mailbox at router 1 (neighbours 8, 2, 3, 4 on ports
// 0..3), with the SPP and output port controllers modelled here. An
// acknowledgment with CM 5, 3, 1, 8 arriving on port 2 must start learning
// with the reward of the 1->3 hop, port 2 and the original QSD, wait for
// the SPP, then go out on port 0 towards router 8. At router 8 (the source)
// it must be consumed; an acknowledgment not listing the router is dropped.
module tb_ack_mailbox;
  import cpn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] my_addr;
  logic [N-1:0][ADDR_W-1:0] nbr;
  logic [N-1:0] has_ack, take;
  packet_t [N-1:0] ipc_pkt;
  logic start_ack, done_ack, opc_req, opc_grant, ev_learn, ev_delivered, ev_drop;
  qsd_t qsd_ack; port_t inc_port_ack, opc_port; logic [P_W-1:0] rew_val;
  packet_t opc_pkt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ack_mailbox dut (.clk, .rst_n, .my_addr, .neighbor_addr(nbr), .ipc_has_ack(has_ack), .ipc_pkt,
    .ipc_take(take), .start_ack, .qsd_ack, .inc_port_ack, .rew_val, .done_ack,
    .opc_req, .opc_port, .opc_pkt, .opc_grant, .ev_learn, .ev_delivered, .ev_drop);

  // SPP learning model: done 20 cycles after start
  int rl_calls = 0, cnt = 0; qsd_t got_qsd; port_t got_port; logic [P_W-1:0] got_rew;
  int start_time, grant_time;
  always_ff @(posedge clk) begin
    done_ack <= 1'b0;
    if (start_ack) begin cnt <= 20; rl_calls++; got_qsd <= qsd_ack; got_port <= inc_port_ack; got_rew <= rew_val; end
    else if (cnt != 0) begin cnt <= cnt - 1; if (cnt == 1) done_ack <= 1'b1; end
  end
  assign opc_grant = opc_req;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic serve(input packet_t pk, input port_t p, output packet_t sent, output port_t port,
                       output logic deliv, output logic dropped, output int cycles);
    ipc_pkt[p] = pk; has_ack[p] = 1; deliv = 0; dropped = 0; cycles = 0; port = '0;
    for (int c = 0; c < 200; c++) begin
      @(posedge clk); cycles++;
      if (take[p]) has_ack[p] <= 0;
      if (ev_delivered) begin deliv = 1; break; end
      if (ev_drop) begin dropped = 1; break; end
      if (opc_grant) begin sent = opc_pkt; port = opc_port; break; end
    end
    repeat (3) @(negedge clk);
  endtask

  packet_t a, s; port_t op; logic dl, dr; int cyc;
  initial begin
    nbr = {32'd4, 32'd3, 32'd2, 32'd8};
    my_addr = 32'd1; has_ack = '0; ipc_pkt = '0;
    a = '0; a.ptype = PKT_ACK; a.qsd = '{qos: 1, src: 5, dst: 8}; a.len = 4;
    a.cm[0] = '{addr: 5, reward: 16'h0000};
    // In the reversed CM the entry before a router carries the reward of the
    // hop that router chose: entry 1 (router 3) holds the reward of link 1->3,
    // entry 2 (router 1) that of link 8->1.
    a.cm[1] = '{addr: 3, reward: 16'h4321};
    a.cm[2] = '{addr: 1, reward: 16'h1111};
    a.cm[3] = '{addr: 8, reward: 16'h0000};
    repeat (2) @(negedge clk); rst_n = 1; repeat (2) @(negedge clk);
    serve(a, 2, s, op, dl, dr, cyc);
    chk(rl_calls == 1 && got_rew == 16'h4321 && got_port == 2, "learning with hop reward and port");
    chk(got_qsd.src == 8 && got_qsd.dst == 5 && got_qsd.qos == 1, "QSD swapped back");
    chk(!dl && !dr && op == 0 && s == a, "forwarded unchanged towards router 8");
    chk(cyc > 20, "waited for the SPP");
    // at the source router 8 (neighbours 1, 2)
    my_addr = 32'd8; nbr = {32'd0, 32'd0, 32'd2, 32'd1};
    serve(a, 0, s, op, dl, dr, cyc);
    chk(rl_calls == 2 && got_rew == 16'h1111 && got_port == 0, "learning at the source");
    chk(dl && !dr, "consumed at the source");
    // not listed: dropped without learning
    my_addr = 32'd7;
    serve(a, 1, s, op, dl, dr, cyc);
    chk(dr && rl_calls == 2, "dropped when not listed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
