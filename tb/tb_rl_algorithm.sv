// Testbench for rl_algorithm, run together with a neuron_array and a
// one-model table answered by the testbench (done two edges after start).
//  * The two published examples on a table miss: reward 0x3FF9 for port 0
//    against threshold 0x0100, and reward 0x000F punishing port 3. The
//    written weights must equal the published ones exactly, the ports must
//    be 0 and 1 in the punishment case and 0 first in the reward case.
//  * Random rewards and ports on stored models, against a reference model
//    of the update and normalization written here.
//  * Every update must end within the 55 cycles of the reference design.
module tb_rl_algorithm;
  import cpn_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0;
  port_t inc_port;
  logic [P_W-1:0] reward;
  logic done, tbl_start, tbl_read, tbl_done, tbl_hit;
  logic [N-1:0][W_W-1:0] tbl_wp, tbl_wm, wr_wp, wr_wm, na_wp, na_wm;
  logic [P_W-1:0] tbl_thr, wr_thr;
  port_t wr_primary, wr_secondary;
  logic na_load, na_step, na_conv, rewarded, last_hit;
  logic [R_W-1:0] na_rate;
  logic [N-1:0][P_W-1:0] na_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rl_algorithm #(.N(N)) dut (.clk, .rst_n, .start, .inc_port, .reward, .done,
    .tbl_start, .tbl_read, .tbl_done, .tbl_hit, .tbl_wp, .tbl_wm, .tbl_thr,
    .wr_wp, .wr_wm, .wr_thr, .wr_primary, .wr_secondary,
    .na_load, .na_step, .na_wp, .na_wm, .na_rate, .na_q, .na_conv, .rewarded, .last_hit);

  neuron_array #(.N(N)) u_na (.clk, .rst_n, .load(na_load), .step(na_step),
    .wp(na_wp), .wm(na_wm), .rate(na_rate), .lambda_exc(LAMBDA_EXC),
    .lambda_inh(LAMBDA_INH), .q(na_q), .converged(na_conv));

  // one-entry table
  logic stored;
  rnn_model_t mem;
  decision_t mem_dec;
  logic [1:0] pipe;
  logic pipe_rd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin pipe <= '0; pipe_rd <= 0; tbl_hit <= 0; end
    else begin
      pipe <= {pipe[0], tbl_start};
      if (tbl_start) pipe_rd <= tbl_read;
      if (pipe[0]) begin
        tbl_hit <= stored;
        if (pipe_rd) begin tbl_wp <= mem.wp; tbl_wm <= mem.wm; tbl_thr <= mem.thr; end
        else begin
          mem.wp <= wr_wp; mem.wm <= wr_wm; mem.thr <= wr_thr;
          mem_dec <= '{primary: wr_primary, secondary: wr_secondary};
        end
      end
    end
  end
  assign tbl_done = pipe[1];

  // reference of the weight update
  function automatic rnn_model_t ref_update(rnn_model_t m, port_t k, logic [15:0] r);
    longint wp[N], wm[N], a, a3, rold = 0, rstar = 0, f;
    rnn_model_t o;
    for (int j = 0; j < N; j++) begin wp[j] = m.wp[j]; wm[j] = m.wm[j]; rold += wp[j] + wm[j]; end
    if (m.thr <= r) begin
      a = r - m.thr; a3 = a / (N-1);
      for (int j = 0; j < N; j++) if (j == k) wp[j] += a; else wm[j] += a3;
    end else begin
      a = m.thr - r; a3 = a / (N-1);
      for (int j = 0; j < N; j++) if (j == k) wm[j] += a; else wp[j] += a3;
    end
    for (int j = 0; j < N; j++) rstar += wp[j] + wm[j];
    f = (rold * 32768) / rstar;
    for (int j = 0; j < N; j++) begin
      o.wp[j] = W_W'((wp[j] * f) / 32768);
      o.wm[j] = W_W'((wm[j] * f) / 32768);
    end
    o.thr = 16'((longint'(ALPHA) * m.thr + (32768 - longint'(ALPHA)) * r) / 32768);
    return o;
  endfunction

  int max_cycles = 0;
  task automatic run(input port_t k, input logic [15:0] r);
    automatic int cyc = 0;
    inc_port = k; reward = r; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks += 2;
    if (!done) begin failures++; $display("FAIL no done"); end
    if (cyc > 55) begin failures++; $display("FAIL %0d cycles > 55", cyc); end
    if (cyc > max_cycles) max_cycles = cyc;
    @(negedge clk);
  endtask

  task automatic expect_w(input logic [W_W-1:0] got, input logic [W_W-1:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h want %h", what, got, want); end
  endtask

  rnn_model_t prev_m, want;
  initial begin
    inc_port = '0; reward = '0; stored = 0; mem = '0; mem_dec = '0;
    tbl_wp = '0; tbl_wm = '0; tbl_thr = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    // published reward example (table miss, defaults)
    run(0, 16'h3FF9);
    checks += 2;
    if (last_hit || !rewarded) begin failures++; $display("FAIL reward flags"); end
    expect_w(mem.wp[0], 18'h0AA0E, "wp0");
    for (int j = 1; j < N; j++) expect_w(mem.wp[j], 18'h071FB, "wp1..3");
    expect_w(mem.wm[0], 18'h071FB, "wm0");
    for (int j = 1; j < N; j++) expect_w(mem.wm[j], 18'h084AB, "wm1..3");
    checks++; if (mem_dec.primary != 0) begin failures++; $display("FAIL reward primary %0d", mem_dec.primary); end
    checks++; if (na_q[0] < 16'h4A08 || na_q[0] > 16'h4A16) begin failures++; $display("FAIL q0 %h", na_q[0]); end
    checks++; if (mem.thr < 16'h0178 || mem.thr > 16'h0180) begin failures++; $display("FAIL threshold %h", mem.thr); end
    // published punishment example (table miss)
    run(3, 16'h000F);
    checks++; if (rewarded) begin failures++; $display("FAIL punish flag"); end
    expect_w(mem.wm[3], 18'h080B3, "wm3");
    for (int j = 0; j < 3; j++) expect_w(mem.wp[j], 18'h08012, "wp0..2");
    expect_w(mem.wp[3], 18'h07FC3, "wp3");
    for (int j = 0; j < 3; j++) expect_w(mem.wm[j], 18'h07FC3, "wm0..2");
    checks++;
    if (mem_dec.primary != 0 || mem_dec.secondary != 1) begin
      failures++; $display("FAIL punish ports %0d %0d", mem_dec.primary, mem_dec.secondary);
    end
    checks++; if (na_q[3] >= na_q[0]) begin failures++; $display("FAIL punished neuron not lowest"); end
    // stored models: random rewards
    stored = 1;
    for (int t = 0; t < 60; t++) begin
      automatic port_t k = port_t'($urandom_range(0, N-1));
      automatic logic [15:0] r = 16'($urandom_range(0, 16'h7FFF));
      prev_m = mem;
      want = ref_update(prev_m, k, r);
      run(k, r);
      checks++; if (!last_hit) begin failures++; $display("FAIL hit flag"); end
      for (int j = 0; j < N; j++) begin
        expect_w(mem.wp[j], want.wp[j], "random wp");
        expect_w(mem.wm[j], want.wm[j], "random wm");
      end
      expect_w(W_W'(mem.thr), W_W'(want.thr), "random threshold");
      // stored ports are the two largest q's
      checks++;
      for (int j = 0; j < N; j++) begin
        if (na_q[j] > na_q[mem_dec.primary] ||
            (port_t'(j) != mem_dec.primary && na_q[j] > na_q[mem_dec.secondary]) ||
            mem_dec.primary == mem_dec.secondary) begin
          failures++; $display("FAIL ports %0d %0d not the best", mem_dec.primary, mem_dec.secondary); break;
        end
      end
    end
    $display("longest update: %0d cycles", max_cycles);
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
