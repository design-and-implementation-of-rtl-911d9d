// wst_ram: RAM of the weight storage table, addressed by CAM match lines.
//
// DEPTH words of WIDTH bits. Each port is addressed by one-hot word lines
// straight from the CAM. Port 1 returns only the low DEC_OUT bits of the
// word (the stored port decision); port 2 returns the upper bits (the RNN
// model) and can also write the whole word. Reads are registered: with
// rd1/rd2 high the selected word appears on the outputs after the edge and
// is held until the next read. A write on port 2 and a read on port 1 of
// the same word in one cycle returns the old word. Word size follows the
// reference port widths (164-bit input, 160-bit and 4-bit outputs); the
// registered read is this design's choice. Contents are not reset: a word
// is only read after it has been written.
module wst_ram
  import cpn_pkg::*;
#(
  parameter int DEPTH   = TBL_DEPTH,
  parameter int WIDTH   = ENTRY_W,
  parameter int DEC_OUT = DEC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DEPTH-1:0]         wl1,
  input  logic                     rd1,
  output logic [DEC_OUT-1:0]       dout1,
  input  logic [DEPTH-1:0]         wl2,
  input  logic                     rd2,
  input  logic                     we2,
  input  logic [WIDTH-1:0]         din2,
  output logic [WIDTH-DEC_OUT-1:0] dout2
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] sel1, sel2;

  always_comb begin
    sel1 = '0;
    sel2 = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (wl1[i]) sel1 |= mem[i];
      if (wl2[i]) sel2 |= mem[i];
    end
  end

  always_ff @(posedge clk) begin
    if (we2) begin
      for (int i = 0; i < DEPTH; i++)
        if (wl2[i]) mem[i] <= din2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout1 <= '0;
      dout2 <= '0;
    end else begin
      if (rd1) dout1 <= sel1[DEC_OUT-1:0];
      if (rd2) dout2 <= sel2[WIDTH-1:DEC_OUT];
    end
  end
endmodule
