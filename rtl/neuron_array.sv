// neuron_array: N reduced neurons iterated to their steady state.
//
// The array holds the current q of every neuron in registers. All neurons
// share the same sum of q's, and each has its own excitation and inhibition
// weight. 'load' sets every q to Q_INIT (0.5); each cycle with 'step' high
// evaluates all neurons once on the present q's (a Jacobi iteration) and
// stores the results. 'converged' is high after a step in which no q moved
// by more than TOL LSBs. Weights, rate and exogenous rates must be held
// stable while stepping. Reset loads Q_INIT. The start value, the iteration
// order and the convergence test are this design's choices.
module neuron_array
  import cpn_pkg::*;
#(
  parameter int N   = N_PORTS,
  parameter int TOL = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                step,
  input  logic [N-1:0][W_W-1:0] wp,
  input  logic [N-1:0][W_W-1:0] wm,
  input  logic [R_W-1:0]      rate,
  input  logic [R_W-1:0]      lambda_exc,
  input  logic [R_W-1:0]      lambda_inh,
  output logic [N-1:0][P_W-1:0] q,
  output logic                converged
);
  localparam int SQ_W = P_W + $clog2(N) + 1;

  logic [N-1:0][P_W-1:0] q_next;
  logic [SQ_W-1:0]       sum_wide;
  logic [W_W-1:0]        sum_q;
  logic                  small_step;

  always_comb begin
    sum_wide = '0;
    for (int i = 0; i < N; i++) sum_wide += SQ_W'(q[i]);
    sum_q = (sum_wide > SQ_W'({W_W{1'b1}})) ? {W_W{1'b1}} : W_W'(sum_wide);
  end

  for (genvar i = 0; i < N; i++) begin : g_neuron
    rnn_neuron u_neuron (
      .wp(wp[i]), .wm(wm[i]), .sum_q(sum_q), .rate(rate),
      .lambda_exc(lambda_exc), .lambda_inh(lambda_inh), .q(q_next[i])
    );
  end

  always_comb begin
    small_step = 1'b1;
    for (int i = 0; i < N; i++) begin
      if ({1'b0, q_next[i]} > {1'b0, q[i]} + (P_W+1)'(TOL) ||
          {1'b0, q[i]} > {1'b0, q_next[i]} + (P_W+1)'(TOL))
        small_step = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= {N{Q_INIT}};
      converged <= 1'b0;
    end else if (load) begin
      q         <= {N{Q_INIT}};
      converged <= 1'b0;
    end else if (step) begin
      q         <= q_next;
      converged <= small_step;
    end
  end
endmodule
