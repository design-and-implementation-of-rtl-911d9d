// output_port_ctrl: sending side of one router link.
//
// Holds one packet and offers it on the link with out_valid until the far
// end takes it (out_valid and out_ready high on an edge). The system
// controller and the mailbox both request service; when the buffer is
// empty the request is granted for one cycle and the packet copied in, the
// system controller first when both ask, so smart packets are never held up
// by acknowledgments. Buffer depth, handshake and the priority are this
// design's choices.
module output_port_ctrl
  import cpn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_sc,
  input  packet_t pkt_sc,
  output logic    grant_sc,
  input  logic    req_mb,
  input  packet_t pkt_mb,
  output logic    grant_mb,
  output logic    out_valid,
  output packet_t out_pkt,
  input  logic    out_ready
);
  logic free;

  assign free     = !out_valid || out_ready;
  assign grant_sc = free && req_sc;
  assign grant_mb = free && req_mb && !req_sc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else if (grant_sc) begin
      out_valid <= 1'b1;
      out_pkt   <= pkt_sc;
    end else if (grant_mb) begin
      out_valid <= 1'b1;
      out_pkt   <= pkt_mb;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end
endmodule
