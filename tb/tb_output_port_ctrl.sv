// Testbench for output_port_ctrl: grants the system controller before the
// mailbox, holds a packet until the link takes it, and accepts a new packet
// in the same cycle the old one leaves.
module tb_output_port_ctrl;
  import cpn_pkg::*;
  logic clk = 0, rst_n = 0, req_sc = 0, req_mb = 0, out_ready = 0;
  packet_t pkt_sc, pkt_mb, out_pkt;
  logic grant_sc, grant_mb, out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_port_ctrl dut (.clk, .rst_n, .req_sc, .pkt_sc, .grant_sc, .req_mb, .pkt_mb, .grant_mb,
                        .out_valid, .out_pkt, .out_ready);
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    pkt_sc = '0; pkt_sc.ptype = PKT_SMART; pkt_sc.qsd.src = 32'd11;
    pkt_mb = '0; pkt_mb.ptype = PKT_ACK;   pkt_mb.qsd.src = 32'd22;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    chk(!out_valid, "idle after reset");
    // both request: system controller wins
    req_sc = 1; req_mb = 1; #1;
    chk(grant_sc && !grant_mb, "priority to system controller");
    @(negedge clk); req_sc = 0; #1;
    chk(out_valid && out_pkt == pkt_sc, "smart packet offered");
    chk(!grant_mb, "no grant while full and link busy");
    @(negedge clk);
    chk(out_valid && out_pkt == pkt_sc, "held while not ready");
    // link takes it; the mailbox packet enters in the same cycle
    out_ready = 1; #1;
    chk(grant_mb, "grant as the buffer empties");
    @(negedge clk); req_mb = 0; #1;
    chk(out_valid && out_pkt == pkt_mb, "ack offered");
    @(negedge clk);
    chk(!out_valid, "empty after transfer");
    for (int t = 0; t < 50; t++) begin
      req_sc = $urandom_range(0, 1); req_mb = $urandom_range(0, 1); out_ready = $urandom_range(0, 1);
      #1;
      chk(!(grant_sc && grant_mb), "one grant at a time");
      chk(!(grant_mb && req_sc), "mailbox never before system controller");
      chk((grant_sc || grant_mb) == ((req_sc || req_mb) && (!out_valid || out_ready)), "grant rule");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
