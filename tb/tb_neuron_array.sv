// Testbench for neuron_array: iterates the 4-neuron array with the weights
// of the published reward and punishment examples and checks that it
// converges to the published steady-state probabilities (0x4A0F / 0x3CC4
// and 0x4009 / 0x3FE1), and that 'load' restarts from 0.5.
module tb_neuron_array;
  import cpn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [N-1:0][W_W-1:0] wp, wm;
  logic [N-1:0][P_W-1:0] q;
  logic converged;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neuron_array #(.N(N)) dut (.clk, .rst_n, .load, .step, .wp, .wm,
    .rate(22'h040000), .lambda_exc(LAMBDA_EXC), .lambda_inh(LAMBDA_INH),
    .q, .converged);

  task automatic expect_near(input logic [P_W-1:0] got, input int want, input int tol, input string what);
    checks++;
    if (int'(got) > want + tol || int'(got) < want - tol) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want[15:0]);
    end
  endtask

  task automatic run_to_convergence(output int iters);
    iters = 0;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < N; i++) expect_near(q[i], 'h4000, 0, "q after load");
    step = 1;
    do begin
      @(negedge clk); iters++;
    end while (!(converged && iters >= 2) && iters < 40);
    step = 0;
  endtask

  int it;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reward example: port 0 rewarded
    wp = {18'h071FB, 18'h071FB, 18'h071FB, 18'h0AA0E};
    wm = {18'h084AB, 18'h084AB, 18'h084AB, 18'h071FB};
    run_to_convergence(it);
    checks++; if (!converged) begin failures++; $display("FAIL no convergence"); end
    expect_near(q[0], 'h4A0F, 6, "reward q0");
    for (int i = 1; i < N; i++) expect_near(q[i], 'h3CC4, 6, "reward q1..3");
    checks++; if (it > 20) begin failures++; $display("FAIL %0d iterations", it); end
    // punishment example: port 3 punished
    wp = {18'h07FC3, 18'h08012, 18'h08012, 18'h08012};
    wm = {18'h080B3, 18'h07FC3, 18'h07FC3, 18'h07FC3};
    run_to_convergence(it);
    for (int i = 0; i < 3; i++) expect_near(q[i], 'h4009, 4, "punish q0..2");
    expect_near(q[3], 'h3FE1, 4, "punish q3");
    // holding: without step the outputs stay
    begin
      logic [N-1:0][P_W-1:0] hold;
      hold = q;
      repeat (3) @(negedge clk);
      checks++; if (q != hold) begin failures++; $display("FAIL q moved without step"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
