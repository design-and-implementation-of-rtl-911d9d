// spp: smart packet processor, the RNN routing engine of a CPN router.
//
// Two independent request interfaces share one weight storage table:
//  * the smart packet side (system controller): start_sp with qsd_sp and
//    inc_port_sp asks for an output port; done_sp pulses with out_port_sp.
//    It uses table port 1 and never waits for learning.
//  * the acknowledgment side (mailbox): start_ack with qsd_ack, inc_port_ack
//    (the port the smart packet had been sent out on) and rew_val runs one
//    reinforcement learning update on table port 2 and the neuron array;
//    done_ack pulses at the end.
// link_up gives the state of the router's links and is used by the smart
// packet side to skip disconnected ports. QSD inputs must be held from
// start until done. The composition (SP interface, RL component, neurons,
// weight storage table) follows the reference design.
module spp
  import cpn_pkg::*;
#(
  parameter int N     = N_PORTS,
  parameter int DEPTH = TBL_DEPTH,
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N-1:0] link_up,
  // smart packet interface
  input  logic        start_sp,
  input  qsd_t        qsd_sp,
  input  port_t       inc_port_sp,
  output logic        done_sp,
  output port_t       out_port_sp,
  // acknowledgment interface
  input  logic        start_ack,
  input  qsd_t        qsd_ack,
  input  port_t       inc_port_ack,
  input  logic [P_W-1:0] rew_val,
  output logic        done_ack,
  // status of the last learning update: rewarded (else punished), model found
  output logic        ack_rewarded,
  output logic        ack_hit
);
  // This SPP uses the package's fixed-size table entry types.
  if (N != N_PORTS) begin : g_bad_n
    $error("spp: N must equal cpn_pkg::N_PORTS");
  end

  logic       t1_start, t1_done, t1_hit;
  decision_t  t1_dec;
  logic       t2_start, t2_read, t2_done, t2_hit;
  rnn_model_t t2_model;
  tbl_entry_t t2_wdata;

  logic                   na_load, na_step, na_conv;
  logic [N-1:0][W_W-1:0]  na_wp, na_wm;
  logic [R_W-1:0]         na_rate;
  logic [N-1:0][P_W-1:0]  na_q;

  weight_storage_table #(.DEPTH(DEPTH)) u_table (
    .clk, .rst_n,
    .start1(t1_start), .qsd1(qsd_sp), .done1(t1_done), .hit1(t1_hit), .dout1(t1_dec),
    .start2(t2_start), .read2(t2_read), .qsd2(qsd_ack), .din2(t2_wdata),
    .done2(t2_done), .hit2(t2_hit), .dout2(t2_model)
  );

  sp_interface #(.N(N), .LFSR_SEED(LFSR_SEED)) u_spi (
    .clk, .rst_n,
    .start(start_sp), .inc_port(inc_port_sp), .link_up,
    .done(done_sp), .out_port(out_port_sp),
    .tbl_start(t1_start), .tbl_done(t1_done), .tbl_hit(t1_hit),
    .tbl_primary(t1_dec.primary), .tbl_secondary(t1_dec.secondary)
  );

  rl_algorithm #(.N(N)) u_rl (
    .clk, .rst_n,
    .start(start_ack), .inc_port(inc_port_ack), .reward(rew_val), .done(done_ack),
    .tbl_start(t2_start), .tbl_read(t2_read), .tbl_done(t2_done), .tbl_hit(t2_hit),
    .tbl_wp(t2_model.wp), .tbl_wm(t2_model.wm), .tbl_thr(t2_model.thr),
    .wr_wp(t2_wdata.model.wp), .wr_wm(t2_wdata.model.wm), .wr_thr(t2_wdata.model.thr),
    .wr_primary(t2_wdata.dec.primary), .wr_secondary(t2_wdata.dec.secondary),
    .na_load, .na_step, .na_wp, .na_wm, .na_rate, .na_q, .na_conv,
    .rewarded(ack_rewarded), .last_hit(ack_hit)
  );

  neuron_array #(.N(N)) u_neurons (
    .clk, .rst_n, .load(na_load), .step(na_step),
    .wp(na_wp), .wm(na_wm), .rate(na_rate),
    .lambda_exc(LAMBDA_EXC), .lambda_inh(LAMBDA_INH),
    .q(na_q), .converged(na_conv)
  );
endmodule
