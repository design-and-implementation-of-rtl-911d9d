// Testbench for ack_table_ctrl: reads (hit and miss), writes to an existing
// word, and allocation on a write miss: first free word, then round-robin
// replacement once all words are valid.
module tb_ack_table_ctrl;
  import cpn_pkg::*;
  localparam int D = TBL_DEPTH;
  logic clk = 0, rst_n = 0, start = 0, read = 0;
  logic [D-1:0] cam_match, cam_valid, ram_wl;
  logic cam_we, ram_rd, ram_we, done, hit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ack_table_ctrl dut (.clk, .rst_n, .start, .read, .cam_match, .cam_valid, .cam_we,
                      .ram_wl, .ram_rd, .ram_we, .done, .hit);

  task automatic op(input logic rd, input logic [D-1:0] m, input logic [D-1:0] v,
                    input logic [D-1:0] want_wl, input logic want_cam_we);
    cam_match = m; cam_valid = v; read = rd; start = 1;
    @(negedge clk);
    start = 0;
    checks += 4;
    if (ram_wl != want_wl) begin failures++; $display("FAIL wl %h want %h", ram_wl, want_wl); end
    if (ram_rd != rd) begin failures++; $display("FAIL ram_rd"); end
    if (ram_we != !rd) begin failures++; $display("FAIL ram_we"); end
    if (cam_we != want_cam_we) begin failures++; $display("FAIL cam_we"); end
    @(negedge clk);
    checks += 3;
    if (!done) begin failures++; $display("FAIL done"); end
    if (hit != (m != '0)) begin failures++; $display("FAIL hit"); end
    if (ram_we || cam_we) begin failures++; $display("FAIL write held"); end
    @(negedge clk);
  endtask

  initial begin
    cam_match = '0; cam_valid = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // read hit / miss
    op(1, 16'h0040, 16'h00FF, 16'h0040, 0);
    op(1, 16'h0000, 16'h00FF, 16'h0000, 0);
    // write hit: same word, no CAM write
    op(0, 16'h0004, 16'h00FF, 16'h0004, 0);
    // write miss with free words: lowest free word
    op(0, 16'h0000, 16'h00FF, 16'h0100, 1);
    op(0, 16'h0000, 16'hFFF7, 16'h0008, 1);
    // full: round-robin 0,1,2,...
    for (int i = 0; i < 18; i++) op(0, 16'h0000, 16'hFFFF, D'(1) << (i % D), 1);
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
