// input_port_ctrl: receiving side of one router link.
//
// Holds one packet. A packet is accepted from the link when in_valid and
// in_ready are both high; in_ready is high while the buffer is empty.
// Smart packets raise 'has_smart' (a request to the system controller),
// acknowledgments raise 'has_ack' (a request to the mailbox); other packet
// types are not handled by this router and are discarded on arrival. The
// unit that serves the request pulses 'take' while it copies 'pkt', which
// frees the buffer for the next edge. The one-entry buffer and valid/ready
// link handshake are this design's choices: the reference only asks that
// the link be reliable and simple.
module input_port_ctrl
  import cpn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  packet_t in_pkt,
  output logic    in_ready,
  output logic    has_smart,
  output logic    has_ack,
  output packet_t pkt,
  input  logic    take
);
  logic full;

  assign in_ready  = !full;
  assign has_smart = full && (pkt.ptype == PKT_SMART);
  assign has_ack   = full && (pkt.ptype == PKT_ACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      pkt  <= '0;
    end else if (!full) begin
      if (in_valid && (in_pkt.ptype == PKT_SMART || in_pkt.ptype == PKT_ACK)) begin
        full <= 1'b1;
        pkt  <= in_pkt;
      end
    end else if (take) begin
      full <= 1'b0;
    end
  end

`ifndef SYNTHESIS
  a_take_when_full: assert property (@(posedge clk) disable iff (!rst_n) take |-> full);
`endif
endmodule
