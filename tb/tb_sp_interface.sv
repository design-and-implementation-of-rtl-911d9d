// Testbench for sp_interface. The table port is answered by a small model
// in the testbench (done two edges after start, with a scripted hit flag
// and decision). Checks the choice of port for: stored primary usable;
// primary is the incoming port; primary and secondary disconnected; all
// other links down (incoming port returned); and table misses (random port,
// never the incoming or a disconnected one). Also checks that done comes
// within 6 cycles of start when the first candidate is usable.
module tb_sp_interface;
  import cpn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0;
  port_t inc_port, out_port, tbl_primary, tbl_secondary;
  logic [N-1:0] link_up;
  logic done, tbl_start, tbl_done, tbl_hit;
  logic hit_script;
  decision_t dec_script;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sp_interface #(.N(N)) dut (.clk, .rst_n, .start, .inc_port, .link_up, .done, .out_port,
    .tbl_start, .tbl_done, .tbl_hit, .tbl_primary, .tbl_secondary);

  // table port model
  logic [1:0] tbl_pipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tbl_pipe <= '0; tbl_hit <= 0; tbl_primary <= '0; tbl_secondary <= '0;
    end else begin
      tbl_pipe <= {tbl_pipe[0], tbl_start};
      if (tbl_pipe[0]) begin
        tbl_hit <= hit_script; tbl_primary <= dec_script.primary; tbl_secondary <= dec_script.secondary;
      end
    end
  end
  assign tbl_done = tbl_pipe[1];

  task automatic request(input port_t inc, input logic [N-1:0] links, input logic h,
                         input decision_t d, output port_t got, output int cycles);
    inc_port = inc; link_up = links; hit_script = h; dec_script = d;
    start = 1; cycles = 0;
    @(negedge clk); start = 0; cycles = 1;
    while (!done && cycles < 40) begin @(negedge clk); cycles++; end
    got = out_port;
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    @(negedge clk);
  endtask

  task automatic expect_port(input port_t inc, input logic [N-1:0] links, input logic h,
                             input decision_t d, input port_t want, input int max_cycles);
    port_t got; int cyc;
    request(inc, links, h, d, got, cyc);
    checks += 2;
    if (got != want) begin failures++; $display("FAIL inc=%0d links=%b hit=%b dec=%0d/%0d: got %0d want %0d", inc, links, h, d.primary, d.secondary, got, want); end
    if (cyc > max_cycles) begin failures++; $display("FAIL latency %0d > %0d", cyc, max_cycles); end
  endtask

  int hist [N];
  initial begin
    inc_port = '0; link_up = '1; hit_script = 0; dec_script = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    // stored decision, primary usable: within the 6-cycle service time
    expect_port(0, 4'b1111, 1, '{primary: 2, secondary: 3}, 2, 6);
    expect_port(1, 4'b1111, 1, '{primary: 0, secondary: 3}, 0, 6);
    // primary is the incoming port -> secondary
    expect_port(2, 4'b1111, 1, '{primary: 2, secondary: 3}, 3, 12);
    // primary disconnected -> secondary
    expect_port(0, 4'b1011, 1, '{primary: 2, secondary: 3}, 3, 12);
    // primary and secondary disconnected -> the only other usable port
    expect_port(0, 4'b0011, 1, '{primary: 2, secondary: 3}, 1, 16);
    // only the incoming link up -> incoming port
    expect_port(1, 4'b0010, 1, '{primary: 2, secondary: 3}, 1, 20);
    expect_port(3, 4'b0000, 0, '{primary: 0, secondary: 0}, 3, 20);
    // misses: random, valid port
    for (int t = 0; t < 200; t++) begin
      port_t got, inc; int cyc; logic [N-1:0] links;
      inc = port_t'($urandom_range(0, N-1));
      do links = N'($urandom_range(0, 15)); while ((links & ~(N'(1) << inc)) == '0);
      request(inc, links, 0, '0, got, cyc);
      checks += 2;
      if (got == inc || !links[got]) begin failures++; $display("FAIL random port %0d inc %0d links %b", got, inc, links); end
      if (cyc > 20) begin failures++; $display("FAIL miss latency %0d", cyc); end
      hist[got]++;
    end
    // the random choice must spread over the ports
    for (int i = 0; i < N; i++) begin
      checks++;
      if (hist[i] < 10) begin failures++; $display("FAIL port %0d chosen %0d times", i, hist[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
