// Testbench for spp: replays the published four-port scenario.
//  1. A smart packet (QoS 1, source 4, destination 6) arrives on port 0 and
//     the table is empty: a random port other than 0 is returned.
//  2. Its acknowledgment comes back with reward 0x0004, below the default
//     threshold: that port is punished.
//  3. A second smart packet of the same QSD must now avoid that port.
//  4. A model rewarded for port 0 (reward 0x3FF9) sends the next smart
//     packet of its QSD, arriving on port 1, out on port 0 within 6 cycles.
//  5. With port 0 disconnected the same packet takes the stored secondary.
//  6. A smart packet served while a learning update runs (dual-port table).
// Learning must finish within 55 cycles.
module tb_spp;
  import cpn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_PORTS-1:0] link_up;
  logic start_sp = 0, start_ack = 0, done_sp, done_ack, ack_rewarded, ack_hit;
  qsd_t qsd_sp, qsd_ack;
  port_t inc_port_sp, inc_port_ack, out_port_sp;
  logic [P_W-1:0] rew_val;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;   // 50 MHz

  spp dut (.clk, .rst_n, .link_up, .start_sp, .qsd_sp, .inc_port_sp, .done_sp, .out_port_sp,
           .start_ack, .qsd_ack, .inc_port_ack, .rew_val, .done_ack, .ack_rewarded, .ack_hit);

  localparam qsd_t QSD_A = 68'h1_00000004_00000006;
  localparam qsd_t QSD_B = 68'h2_00000005_00000007;

  task automatic smart(input qsd_t q, input port_t inc, output port_t out, output int cyc);
    qsd_sp = q; inc_port_sp = inc; start_sp = 1;
    @(negedge clk); start_sp = 0; cyc = 1;
    while (!done_sp && cyc < 50) begin @(negedge clk); cyc++; end
    checks++; if (!done_sp) begin failures++; $display("FAIL no done_sp"); end
    out = out_port_sp;
    @(negedge clk);
  endtask

  task automatic ack(input qsd_t q, input port_t inc, input logic [15:0] r, output int cyc);
    qsd_ack = q; inc_port_ack = inc; rew_val = r; start_ack = 1;
    @(negedge clk); start_ack = 0; cyc = 1;
    while (!done_ack && cyc < 200) begin @(negedge clk); cyc++; end
    checks += 2;
    if (!done_ack) begin failures++; $display("FAIL no done_ack"); end
    if (cyc > 55) begin failures++; $display("FAIL learning took %0d cycles", cyc); end
    @(negedge clk);
  endtask

  port_t p1, p2, p;
  logic ack_seen = 0;
  always @(posedge clk) if (done_ack) ack_seen <= 1;
  int cyc;
  initial begin
    link_up = '1; qsd_sp = '0; qsd_ack = '0; inc_port_sp = '0; inc_port_ack = '0; rew_val = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    // 1: empty table, random port
    smart(QSD_A, 0, p1, cyc);
    checks++; if (p1 == 0) begin failures++; $display("FAIL random port equals incoming"); end
    // 2: punish it
    ack(QSD_A, p1, 16'h0004, cyc);
    checks++; if (ack_rewarded || ack_hit) begin failures++; $display("FAIL expected punish on new model"); end
    // 3: second packet avoids the punished port
    smart(QSD_A, 0, p2, cyc);
    checks += 2;
    if (p2 == p1 || p2 == 0) begin failures++; $display("FAIL second packet port %0d (punished %0d)", p2, p1); end
    if (cyc > 10) begin failures++; $display("FAIL service took %0d cycles", cyc); end
    // 4: reward port 0 for QSD_B
    ack(QSD_B, 0, 16'h3FF9, cyc);
    checks++; if (!ack_rewarded) begin failures++; $display("FAIL expected reward"); end
    smart(QSD_B, 1, p, cyc);
    checks += 2;
    if (p != 0) begin failures++; $display("FAIL rewarded port not chosen: %0d", p); end
    if (cyc > 6) begin failures++; $display("FAIL smart packet took %0d cycles > 6", cyc); end
    // a second reward on the stored model hits the table
    ack(QSD_B, 0, 16'h3000, cyc);
    checks++; if (!ack_hit) begin failures++; $display("FAIL stored model not found"); end
    // 5: port 0 down -> the secondary (port 1 is incoming, so another port)
    link_up = 4'b1110;
    smart(QSD_B, 1, p, cyc);
    checks++; if (p == 0 || p == 1) begin failures++; $display("FAIL disconnected/incoming port used: %0d", p); end
    link_up = '1;
    // 6: smart packet during a learning update
    ack_seen = 0;
    fork
      ack(QSD_A, p2, 16'h5000, cyc);
      begin
        port_t q; int c;
        repeat (3) @(negedge clk);
        smart(QSD_B, 1, q, c);
        checks += 2;
        if (q != 0) begin failures++; $display("FAIL concurrent packet port %0d", q); end
        if (c > 6) begin failures++; $display("FAIL concurrent packet took %0d cycles", c); end
        checks++;
        if (ack_seen) begin failures++; $display("FAIL learning was not running meanwhile"); end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
