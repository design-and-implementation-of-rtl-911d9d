// Testbench for weight_storage_table: creates RNN models for random QSDs
// through port 2, updates some, and reads them back on both ports,
// including misses, simultaneous use of the two ports and replacement
// once the 16 words are full. A scoreboard keyed by QSD gives the expected
// hit flag and data; both ports must finish two edges after start.
module tb_weight_storage_table;
  import cpn_pkg::*;
  localparam int D = TBL_DEPTH;
  logic clk = 0, rst_n = 0;
  logic start1 = 0, start2 = 0, read2 = 1;
  qsd_t qsd1, qsd2;
  tbl_entry_t din2;
  logic done1, hit1, done2, hit2;
  decision_t dout1;
  rnn_model_t dout2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  weight_storage_table dut (.clk, .rst_n, .start1, .qsd1, .done1, .hit1, .dout1,
    .start2, .read2, .qsd2, .din2, .done2, .hit2, .dout2);

  // scoreboard
  tbl_entry_t sb_data [qsd_t];
  qsd_t       keys [$];

  function automatic qsd_t rqsd();
    qsd_t k;
    k.qos = QOS_W'($urandom_range(0, 3)); k.src = $urandom_range(0, 15); k.dst = $urandom_range(0, 15);
    return k;
  endfunction

  function automatic tbl_entry_t rentry();
    tbl_entry_t e;
    for (int i = 0; i < ENTRY_W; i += 32) e[i +: 32] = $urandom();
    return e;
  endfunction

  // one access on port 2, optionally together with a read on port 1
  task automatic access(input logic rd, input qsd_t k2, input tbl_entry_t d,
                        input logic with1, input qsd_t k1);
    logic exp_hit1, exp_hit2;
    tbl_entry_t e1, e2;
    exp_hit1 = sb_data.exists(k1); if (exp_hit1) e1 = sb_data[k1];
    exp_hit2 = sb_data.exists(k2); if (exp_hit2) e2 = sb_data[k2];
    qsd2 = k2; read2 = rd; din2 = d; start2 = 1;
    qsd1 = k1; start1 = with1;
    @(negedge clk); start1 = 0; start2 = 0;
    checks++; if (done1 || done2) begin failures++; $display("FAIL early done"); end
    @(negedge clk);
    checks += 2;
    if (!done2) begin failures++; $display("FAIL no done2"); end
    if (hit2 != exp_hit2) begin failures++; $display("FAIL hit2 %b for %h", hit2, k2); end
    if (rd && exp_hit2) begin
      checks++;
      if (dout2 != e2.model) begin failures++; $display("FAIL dout2 for %h", k2); end
    end
    if (with1) begin
      checks += 2;
      if (!done1) begin failures++; $display("FAIL no done1"); end
      if (hit1 != exp_hit1) begin failures++; $display("FAIL hit1 %b for %h", hit1, k1); end
      if (exp_hit1) begin
        checks++;
        if (dout1 != e1.dec) begin failures++; $display("FAIL dout1 for %h", k1); end
      end
    end
    if (!rd) begin
      if (!sb_data.exists(k2)) keys.push_back(k2);
      sb_data[k2] = d;
    end
  endtask

  int writes_new = 0;
  initial begin
    qsd1 = '0; qsd2 = '0; din2 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // empty table misses on both ports
    access(1, rqsd(), '0, 1, rqsd());
    // create up to 16 models, reading others on port 1 meanwhile
    while (keys.size() < D) begin
      automatic qsd_t k = rqsd();
      if (!sb_data.exists(k)) access(0, k, rentry(), 1, keys.size() > 0 ? keys[0] : k);
    end
    // random reads, updates of existing models
    for (int t = 0; t < 300; t++) begin
      automatic qsd_t a = keys[$urandom_range(0, keys.size()-1)];
      automatic qsd_t b = ($urandom_range(0, 4) == 0) ? rqsd() : keys[$urandom_range(0, keys.size()-1)];
      case ($urandom_range(0, 2))
        0: access(1, a, '0, 1, b);
        1: access(0, a, rentry(), 1, b);
        default: access(1, b, '0, 0, a);
      endcase
    end
    // table full: a new model replaces word 0 (round-robin start), whose key is keys[0]
    begin
      qsd_t k, old;
      do k = rqsd(); while (sb_data.exists(k));
      old = keys[0];
      access(0, k, rentry(), 0, k);
      sb_data.delete(old);
      access(1, old, '0, 1, k);   // evicted: miss on port 2, new model hits on port 1
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
