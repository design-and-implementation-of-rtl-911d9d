// Testbench for wst_ram: writes random words through port 2 and reads them
// back on both ports with one-hot word lines, checking the registered read
// (data after the edge, held while rd is low) and read-before-write.
module tb_wst_ram;
  import cpn_pkg::*;
  localparam int D = TBL_DEPTH;
  logic clk = 0, rst_n = 0, rd1 = 0, rd2 = 0, we2 = 0;
  logic [D-1:0] wl1, wl2;
  logic [ENTRY_W-1:0] din2;
  logic [DEC_W-1:0] dout1;
  logic [MODEL_W-1:0] dout2;
  logic [ENTRY_W-1:0] model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wst_ram dut (.clk, .rst_n, .wl1, .rd1, .dout1, .wl2, .rd2, .we2, .din2, .dout2);

  function automatic logic [ENTRY_W-1:0] rword();
    logic [ENTRY_W-1:0] w;
    for (int i = 0; i < ENTRY_W; i += 32) w[i +: 32] = $urandom();
    return w;
  endfunction

  initial begin
    wl1 = '0; wl2 = '0; din2 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin
      din2 = rword(); model[i] = din2; wl2 = D'(1) << i; we2 = 1;
      @(negedge clk);
    end
    we2 = 0;
    for (int t = 0; t < 100; t++) begin
      automatic int a = $urandom_range(0, D-1), b = $urandom_range(0, D-1);
      wl1 = D'(1) << a; wl2 = D'(1) << b; rd1 = 1; rd2 = 1;
      @(negedge clk);
      rd1 = 0; rd2 = 0; wl1 = '0; wl2 = '0;
      checks += 2;
      if (dout1 != model[a][DEC_W-1:0]) begin failures++; $display("FAIL dout1 word %0d", a); end
      if (dout2 != model[b][ENTRY_W-1:DEC_W]) begin failures++; $display("FAIL dout2 word %0d", b); end
      @(negedge clk);
      checks++;
      if (dout2 != model[b][ENTRY_W-1:DEC_W]) begin failures++; $display("FAIL dout2 not held"); end
    end
    // read on port 1 while port 2 writes the same word: old data
    wl1 = D'(1) << 3; wl2 = D'(1) << 3; rd1 = 1; we2 = 1;
    din2 = ~model[3];
    @(negedge clk);
    checks++; if (dout1 != model[3][DEC_W-1:0]) begin failures++; $display("FAIL read-before-write"); end
    model[3] = din2; we2 = 0;
    @(negedge clk);
    checks++; if (dout1 != model[3][DEC_W-1:0]) begin failures++; $display("FAIL new data"); end
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
