// Testbench for input_port_ctrl: accepts smart and acknowledgment packets,
// refuses new ones while full, discards other packet types, and raises the
// matching request until 'take'.
module tb_input_port_ctrl;
  import cpn_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, take = 0;
  packet_t in_pkt, pkt;
  logic in_ready, has_smart, has_ack;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  input_port_ctrl dut (.clk, .rst_n, .in_valid, .in_pkt, .in_ready, .has_smart, .has_ack, .pkt, .take);

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic packet_t mk(pkt_type_t t, int tag);
    packet_t p = '0;
    p.ptype = t; p.qsd.src = 32'(tag); p.len = 1; p.cm[0].addr = 32'(tag);
    return p;
  endfunction

  initial begin
    in_pkt = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk(in_ready && !has_smart && !has_ack, "empty after reset");
    for (int t = 0; t < 40; t++) begin
      automatic pkt_type_t ty = pkt_type_t'($urandom_range(0, 2));
      automatic packet_t p = mk(ty, t);
      in_pkt = p; in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if (ty == PKT_DUMB) begin
        chk(in_ready && !has_smart && !has_ack, "dumb packet discarded");
      end else begin
        chk(!in_ready, "full");
        chk(has_smart == (ty == PKT_SMART) && has_ack == (ty == PKT_ACK), "request type");
        chk(pkt == p, "packet held");
        // a second packet must wait
        in_pkt = mk(PKT_SMART, 99); in_valid = 1;
        @(negedge clk); in_valid = 0;
        chk(pkt == p, "not overwritten while full");
        take = 1; @(negedge clk); take = 0;
        chk(in_ready && !has_smart && !has_ack, "freed by take");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
