// Testbench for sp_table_ctrl: checks that the match lines seen at start
// are latched as RAM word lines, that the RAM read is asked for on the next
// cycle, and that done pulses for one cycle two edges after start with the
// right hit flag.
module tb_sp_table_ctrl;
  import cpn_pkg::*;
  localparam int D = TBL_DEPTH;
  logic clk = 0, rst_n = 0, start = 0;
  logic [D-1:0] cam_match, ram_wl;
  logic ram_rd, done, hit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sp_table_ctrl dut (.clk, .rst_n, .start, .cam_match, .ram_wl, .ram_rd, .done, .hit);

  initial begin
    cam_match = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      logic [D-1:0] m;
      m = (t % 3 == 0) ? '0 : D'(1) << $urandom_range(0, D-1);
      cam_match = m; start = 1;
      @(negedge clk);
      start = 0; cam_match = ~m;   // later changes must not matter
      checks += 3;
      if (!ram_rd) begin failures++; $display("FAIL no RAM read"); end
      if (ram_wl != m) begin failures++; $display("FAIL word lines %h", ram_wl); end
      if (done) begin failures++; $display("FAIL early done"); end
      @(negedge clk);
      checks += 3;
      if (!done) begin failures++; $display("FAIL no done"); end
      if (hit != (m != '0)) begin failures++; $display("FAIL hit"); end
      if (ram_rd) begin failures++; $display("FAIL RAM read held"); end
      @(negedge clk);
      checks++; if (done) begin failures++; $display("FAIL done not a pulse"); end
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
