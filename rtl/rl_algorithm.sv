// rl_algorithm: reinforcement learning update of one RNN model.
//
// Started by the acknowledgment mailbox with the QSD (applied to table
// port 2), the port the acknowledgment came in on (the earlier decision k)
// and the reward R. Steps, after the reference state diagram:
//   search   read the model of this QSD from the table;
//   default  on a miss start from unit weights and threshold T_DEFAULT;
//   reward   compare: T <= R rewards decision k, otherwise it is punished;
//            a = |R - T|;
//   calc     reward:  wp[k] += a,  wm[j] += a/(n-1) for j != k
//            punish:  wm[k] += a,  wp[j] += a/(n-1) for j != k
//            T' = ALPHA*T + (1-ALPHA)*R;
//   norm     every weight *= r_old / r*, where r_old is the sum of the 2n
//            weights before and r* after the increments, so the firing rate
//            r = r_old of every neuron is unchanged;
//   apply/q  load the neuron array (all q = 0.5) and iterate it, one
//            iteration per cycle, until it converges (at least MIN_ITER,
//            at most MAX_ITER iterations);
//   sort     find the two neurons with the largest q (lower index on a tie);
//   update   write weights, threshold and the two ports back to the table.
// 'done' then pulses for one cycle. All divisions truncate. The whole
// sequence takes well under the 55 cycles of the reference design; the
// testbench checks the bound. ALPHA, MIN_ITER, MAX_ITER and the start value
// of q are this design's choices; the 2n-weight update, the normalization
// and the number formats follow the reference design.
module rl_algorithm
  import cpn_pkg::*;
#(
  parameter int          N        = N_PORTS,
  parameter logic [15:0] ALPHA_P  = ALPHA,
  parameter int          MIN_ITER = 2,
  parameter int          MAX_ITER = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N)-1:0]   inc_port,
  input  logic [P_W-1:0]         reward,
  output logic                   done,
  // table port 2
  output logic                   tbl_start,
  output logic                   tbl_read,
  input  logic                   tbl_done,
  input  logic                   tbl_hit,
  input  logic [N-1:0][W_W-1:0]  tbl_wp,
  input  logic [N-1:0][W_W-1:0]  tbl_wm,
  input  logic [P_W-1:0]         tbl_thr,
  output logic [N-1:0][W_W-1:0]  wr_wp,
  output logic [N-1:0][W_W-1:0]  wr_wm,
  output logic [P_W-1:0]         wr_thr,
  output logic [$clog2(N)-1:0]   wr_primary,
  output logic [$clog2(N)-1:0]   wr_secondary,
  // neuron array
  output logic                   na_load,
  output logic                   na_step,
  output logic [N-1:0][W_W-1:0]  na_wp,
  output logic [N-1:0][W_W-1:0]  na_wm,
  output logic [R_W-1:0]         na_rate,
  input  logic [N-1:0][P_W-1:0]  na_q,
  input  logic                   na_conv,
  // status
  output logic                   rewarded,
  output logic                   last_hit
);
  localparam int PW = $clog2(N);
  localparam int WX = W_W + 2;              // weights before normalization
  localparam int FW = FRAC + 1;             // normalization factor, 1.15

  typedef enum logic [3:0] {
    S_INIT, S_WAIT, S_SEARCH, S_READ, S_DEFAULT, S_REWARD, S_CALC,
    S_NORM, S_APPLY, S_CALCQ, S_SORT, S_UPDATE, S_UWAIT
  } state_t;

  state_t              state;
  logic [PW-1:0]       k_q;
  logic [P_W-1:0]      reward_q, thr, delta, delta_n;
  logic [N-1:0][WX-1:0] wpx, wmx;
  logic [R_W-1:0]      r_old;
  logic [$clog2(MAX_ITER+1)-1:0] iter;
  logic                q_exit;

  // Sums and the normalization factor (combinational on the registers).
  logic [R_W-1:0]      r_cur, r_star;
  logic [FW-1:0]       factor;
  logic [R_W+FRAC-1:0] factor_wide;
  always_comb begin
    r_cur  = '0;
    r_star = '0;
    for (int j = 0; j < N; j++) begin
      r_cur  += R_W'(wpx[j][W_W-1:0]) + R_W'(wmx[j][W_W-1:0]);
      r_star += R_W'(wpx[j]) + R_W'(wmx[j]);
    end
    factor_wide = (r_star == '0) ? '0 : {r_old, {FRAC{1'b0}}} / (R_W+FRAC)'(r_star);
    factor      = (factor_wide > (R_W+FRAC)'({FW{1'b1}})) ? {FW{1'b1}} : FW'(factor_wide);
  end

  // Two best neurons.
  logic [PW-1:0] best, second;
  always_comb begin
    best = '0;
    for (int j = 1; j < N; j++)
      if (na_q[j] > na_q[best]) best = PW'(j);
    second = (best == '0) ? PW'(1) : '0;
    for (int j = 0; j < N; j++)
      if (PW'(j) != best && na_q[j] > na_q[second]) second = PW'(j);
  end

  assign tbl_start = ((state == S_WAIT) && start) || (state == S_UPDATE);
  assign tbl_read  = (state != S_UPDATE);
  assign na_load   = (state == S_APPLY);
  assign q_exit    = (iter >= ($bits(iter))'(MIN_ITER) && na_conv) ||
                     (iter == ($bits(iter))'(MAX_ITER));
  assign na_step   = (state == S_CALCQ) && !q_exit;
  assign na_rate   = r_old;
  assign wr_thr    = thr;
  for (genvar j = 0; j < N; j++) begin : g_w
    assign na_wp[j] = wpx[j][W_W-1:0];
    assign na_wm[j] = wmx[j][W_W-1:0];
    assign wr_wp[j] = wpx[j][W_W-1:0];
    assign wr_wm[j] = wmx[j][W_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      done         <= 1'b0;
      k_q          <= '0;
      reward_q     <= '0;
      thr          <= '0;
      delta        <= '0;
      delta_n      <= '0;
      wpx          <= '0;
      wmx          <= '0;
      r_old        <= '0;
      iter         <= '0;
      wr_primary   <= '0;
      wr_secondary <= '0;
      rewarded     <= 1'b0;
      last_hit     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_INIT: state <= S_WAIT;
        S_WAIT: if (start) begin
          k_q      <= inc_port;
          reward_q <= reward;
          state    <= S_SEARCH;
        end
        S_SEARCH: if (tbl_done) begin
          last_hit <= tbl_hit;
          state    <= tbl_hit ? S_READ : S_DEFAULT;
        end
        S_READ: begin
          for (int j = 0; j < N; j++) begin
            wpx[j] <= WX'(tbl_wp[j]);
            wmx[j] <= WX'(tbl_wm[j]);
          end
          thr   <= tbl_thr;
          state <= S_REWARD;
        end
        S_DEFAULT: begin
          for (int j = 0; j < N; j++) begin
            wpx[j] <= WX'(W_DEFAULT);
            wmx[j] <= WX'(W_DEFAULT);
          end
          thr   <= T_DEFAULT;
          state <= S_REWARD;
        end
        S_REWARD: begin
          r_old    <= r_cur;
          rewarded <= (thr <= reward_q);
          if (thr <= reward_q) begin
            delta   <= reward_q - thr;
            delta_n <= P_W'((reward_q - thr) / P_W'(N-1));
          end else begin
            delta   <= thr - reward_q;
            delta_n <= P_W'((thr - reward_q) / P_W'(N-1));
          end
          state <= S_CALC;
        end
        S_CALC: begin
          for (int j = 0; j < N; j++) begin
            if (rewarded) begin
              if (PW'(j) == k_q) wpx[j] <= wpx[j] + WX'(delta);
              else               wmx[j] <= wmx[j] + WX'(delta_n);
            end else begin
              if (PW'(j) == k_q) wmx[j] <= wmx[j] + WX'(delta);
              else               wpx[j] <= wpx[j] + WX'(delta_n);
            end
          end
          thr <= P_W'(((2*P_W)'(ALPHA_P) * (2*P_W)'(thr) +
                       (2*P_W)'(17'h08000 - 17'(ALPHA_P)) * (2*P_W)'(reward_q)) >> FRAC);
          state <= S_NORM;
        end
        S_NORM: begin
          for (int j = 0; j < N; j++) begin
            wpx[j] <= WX'(((WX+FW)'(wpx[j]) * (WX+FW)'(factor)) >> FRAC);
            wmx[j] <= WX'(((WX+FW)'(wmx[j]) * (WX+FW)'(factor)) >> FRAC);
          end
          state <= S_APPLY;
        end
        S_APPLY: begin
          iter  <= '0;
          state <= S_CALCQ;
        end
        S_CALCQ: begin
          if (q_exit) state <= S_SORT;
          else        iter  <= iter + 1'b1;
        end
        S_SORT: begin
          wr_primary   <= best;
          wr_secondary <= second;
          state        <= S_UPDATE;
        end
        S_UPDATE: state <= S_UWAIT;
        S_UWAIT: if (tbl_done) begin
          done  <= 1'b1;
          state <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end
endmodule
