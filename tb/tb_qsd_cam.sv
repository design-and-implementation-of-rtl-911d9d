// Testbench for qsd_cam: fills words with random keys, then searches both
// ports with stored and absent keys and compares the match lines with a
// scoreboard copy of the contents. Checks that reset empties the CAM.
module tb_qsd_cam;
  import cpn_pkg::*;
  localparam int D = TBL_DEPTH;
  logic clk = 0, rst_n = 0, we = 0;
  logic [QSD_W-1:0] key1, key2, wkey;
  logic [D-1:0] match1, match2, wsel, valid;
  logic [QSD_W-1:0] model [D];
  logic [D-1:0] mvalid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qsd_cam dut (.clk, .rst_n, .key1, .match1, .key2, .match2, .we, .wsel, .wkey, .valid);

  function automatic logic [QSD_W-1:0] rkey();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  function automatic logic [D-1:0] expect_match(logic [QSD_W-1:0] k);
    logic [D-1:0] m = '0;
    for (int i = 0; i < D; i++) m[i] = mvalid[i] && model[i] == k;
    return m;
  endfunction

  initial begin
    mvalid = '0;
    key1 = '0; key2 = '0; wkey = '0; wsel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (valid != '0 || match1 != '0) begin failures++; $display("FAIL not empty after reset"); end
    for (int i = 0; i < D; i += 1 + (i % 3 == 2 ? 1 : 0)) begin
      wkey = rkey(); wsel = D'(1) << i; we = 1;
      model[i] = wkey; mvalid[i] = 1'b1;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int a = $urandom_range(0, D-1), b = $urandom_range(0, D-1);
      key1 = mvalid[a] ? model[a] : rkey();
      key2 = ($urandom_range(0, 3) == 0) ? rkey() : model[b];
      #1;
      checks += 2;
      if (match1 != expect_match(key1)) begin failures++; $display("FAIL port1 %h", match1); end
      if (match2 != expect_match(key2)) begin failures++; $display("FAIL port2 %h", match2); end
      @(negedge clk);
    end
    checks++; if (valid != mvalid) begin failures++; $display("FAIL valid %h", valid); end
    // overwrite one word with the key of another search
    wkey = 68'h1_00000004_00000006; wsel = D'(1) << 5; we = 1;
    model[5] = wkey; mvalid[5] = 1;
    @(negedge clk); we = 0; key1 = wkey; key2 = wkey; #1;
    checks++; if (match1 != expect_match(wkey) || match2 != match1) begin failures++; $display("FAIL overwrite"); end
    rst_n = 0; #1; checks++; if (valid != '0) begin failures++; $display("FAIL reset"); end
    // the stored keys survive reset but must no longer match on either port
    checks++; if (match1 != '0) begin failures++; $display("FAIL port1 matches invalid word"); end
    checks++; if (match2 != '0) begin failures++; $display("FAIL port2 matches invalid word"); end
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
