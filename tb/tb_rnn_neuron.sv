// Testbench for rnn_neuron: random operands against a real-number model of
// q = (wp*Sq + Lambda) / (r + wm*Sq + lambda), allowing for the truncation
// of the fixed-point datapath, plus one known operating point.
module tb_rnn_neuron;
  import cpn_pkg::*;
  logic [W_W-1:0] wp, wm, sum_q;
  logic [R_W-1:0] rate, lexc, linh;
  logic [P_W-1:0] q;
  int checks = 0, failures = 0;

  rnn_neuron dut (.wp, .wm, .sum_q, .rate, .lambda_exc(lexc), .lambda_inh(linh), .q);

  function automatic int expect_q(real fwp, real fwm, real fs, real fr, real fle, real fli);
    real num, den, x;
    num = fwp * fs + fle;
    den = fr + fwm * fs + fli;
    x = num / den * 32768.0;
    if (x > 65535.0) return 65535;
    return int'($floor(x));
  endfunction

  task automatic check_point(int tol);
    int e, d;
    #1;
    e = expect_q(real'(wp)/32768.0, real'(wm)/32768.0, real'(sum_q)/32768.0,
                 real'(rate)/32768.0, real'(lexc)/32768.0, real'(linh)/32768.0);
    d = int'(q) - e;
    checks++;
    if (d > tol || d < -tol) begin
      failures++;
      $display("FAIL wp=%h wm=%h s=%h r=%h q=%h expected~%h", wp, wm, sum_q, rate, q, e[15:0]);
    end
  endtask

  initial begin
    // operating point after a punishment of port 3 (weights 0x08012 / 0x07FC3)
    wp = 18'h08012; wm = 18'h07FC3; sum_q = 18'h0FFF4;
    rate = 22'h040000; lexc = LAMBDA_EXC; linh = '0;
    #1; checks++;
    if (q < 16'h4007 || q > 16'h400B) begin failures++; $display("FAIL known point q=%h", q); end
    for (int i = 0; i < 2000; i++) begin
      wp    = W_W'($urandom_range(0, 18'h3FFFF));
      wm    = W_W'($urandom_range(0, 18'h3FFFF));
      sum_q = W_W'($urandom_range(0, 18'h3FFFF));
      rate  = R_W'($urandom_range(1, 22'h3FFFFF));
      lexc  = R_W'($urandom_range(0, 22'h0FFFFF));
      linh  = R_W'($urandom_range(0, 22'h0FFFFF));
      check_point(3);
    end
    // saturation: large excitation, tiny denominator
    wp = 18'h3FFFF; wm = '0; sum_q = 18'h3FFFF; rate = 22'h1; lexc = '0; linh = '0;
    #1; checks++;
    if (q != 16'hFFFF) begin failures++; $display("FAIL saturation q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
