// qsd_cam: content addressable memory of QSD keys with two search ports.
//
// DEPTH words of KEY_W bits, each with a valid bit. Both search ports
// compare their key against every valid word in parallel and return one
// match line per word (combinational). The write port stores a key and sets
// its valid bit in the word selected by the one-hot word-select lines, on
// the clock edge. Reset clears all valid bits. Size (16 x 68 bits) and the
// two search ports follow the reference design; the valid bits and the
// one-hot write select are this design's choice.
module qsd_cam
  import cpn_pkg::*;
#(
  parameter int DEPTH = TBL_DEPTH,
  parameter int KEY_W = QSD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] key1,
  output logic [DEPTH-1:0] match1,
  input  logic [KEY_W-1:0] key2,
  output logic [DEPTH-1:0] match2,
  input  logic             we,
  input  logic [DEPTH-1:0] wsel,
  input  logic [KEY_W-1:0] wkey,
  output logic [DEPTH-1:0] valid
);
  logic [KEY_W-1:0] keys [DEPTH];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match1[i] = valid[i] && (keys[i] == key1);
      match2[i] = valid[i] && (keys[i] == key2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (we) valid <= valid | wsel;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < DEPTH; i++)
        if (wsel[i]) keys[i] <= wkey;
    end
  end

`ifndef SYNTHESIS
  a_wsel_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> $onehot(wsel));
`endif
endmodule
