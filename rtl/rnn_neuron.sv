// rnn_neuron: one neuron of the reduced random neural network.
//
// With the 2n-weight reduction every neuron i sees a single excitation
// weight wp and a single inhibition weight wm applied to the sum of all
// neuron outputs, so its steady-state excitation probability is
//     q = (wp*Sq + Lambda) / (r + wm*Sq + lambda)
// (Sq = sum of the q's, r = firing rate, Lambda/lambda = exogenous
// excitation/inhibition). The datapath is two multipliers, two adders and
// a divider, as in the reference neuron; it is purely combinational and one
// evaluation is one iteration of the fixed-point solution.
//
// Formats: wp, wm 3.15; sum_q 3.15; rate and lambdas 7.15; q 1.15. Products
// are truncated to 15 fractional bits before the add, the quotient is
// truncated and saturated at 0xFFFF. A zero denominator gives 0xFFFF. The
// truncation points are this design's choice.
module rnn_neuron
  import cpn_pkg::*;
(
  input  logic [W_W-1:0] wp,
  input  logic [W_W-1:0] wm,
  input  logic [W_W-1:0] sum_q,
  input  logic [R_W-1:0] rate,
  input  logic [R_W-1:0] lambda_exc,
  input  logic [R_W-1:0] lambda_inh,
  output logic [P_W-1:0] q
);
  localparam int PROD_W = 2*W_W;      // 6.30
  localparam int SUM_W  = R_W + 2;    // room for three 7.15 terms
  localparam int DIVD_W = SUM_W + FRAC;

  logic [PROD_W-1:0] exc_prod, inh_prod;
  logic [SUM_W-1:0]  num, den;
  logic [DIVD_W-1:0] quot;

  always_comb begin
    exc_prod = PROD_W'(wp) * PROD_W'(sum_q);
    inh_prod = PROD_W'(wm) * PROD_W'(sum_q);
    num = SUM_W'(exc_prod >> FRAC) + SUM_W'(lambda_exc);
    den = SUM_W'(inh_prod >> FRAC) + SUM_W'(rate) + SUM_W'(lambda_inh);
    if (den == '0) quot = '1;
    else           quot = {num, {FRAC{1'b0}}} / DIVD_W'(den);
    q = (quot > DIVD_W'({P_W{1'b1}})) ? {P_W{1'b1}} : quot[P_W-1:0];
  end
endmodule
