// cpn_pkg: shared sizes, fixed-point formats and default values of the
// smart packet processor (SPP) and of the small cognitive packet network
// (CPN) router built around it.
//
// Number formats. Weights are unsigned 3.15 fixed point (18 bits, 0x08000
// is 1.0); probabilities q, rewards and thresholds are unsigned 1.15 (16
// bits). Firing rates and exogenous rates are kept in 7.15 (22 bits) since
// the rate of a neuron with eight unit weights is 8.0. These widths are the
// ones the reference waveforms show (wp/wm 18 bits, q/threshold/reward 16
// bits, 15 fractional bits). The QSD key (QoS, source, destination) is 68
// bits: a 4-bit QoS class and two 32-bit router addresses.
//
// Defaults follow the reference design: unit weights, threshold 0x0100 for
// a newly created RNN model, four ports, a 16-entry table. The exogenous
// excitation rate of 3.0, the zero exogenous inhibition and the smoothing
// constant ALPHA are this design's choices (the first two reproduce the
// published steady-state probabilities exactly).
package cpn_pkg;

  localparam int N_PORTS   = 4;                 // ports = neurons
  localparam int PORT_W    = $clog2(N_PORTS);
  localparam int FRAC      = 15;                // fractional bits everywhere
  localparam int W_W       = 18;                // weight width, 3.15
  localparam int P_W       = 16;                // q / reward / threshold, 1.15
  localparam int R_W       = 22;                // rates, 7.15
  localparam int QOS_W     = 4;
  localparam int ADDR_W    = 32;
  localparam int QSD_W     = QOS_W + 2*ADDR_W;  // 68
  localparam int TBL_DEPTH = 16;                // RNN models held

  // One RNN model as stored in the table: 2n weights and the threshold.
  localparam int MODEL_W   = 2*N_PORTS*W_W + P_W;   // 160
  // Output decision: the two best ports (primary in the upper bits).
  localparam int DEC_W     = 2*PORT_W;              // 4
  localparam int ENTRY_W   = MODEL_W + DEC_W;       // 164

  localparam logic [W_W-1:0] W_DEFAULT   = 18'h08000;   // 1.0
  localparam logic [P_W-1:0] T_DEFAULT   = 16'h0100;
  localparam logic [P_W-1:0] Q_INIT      = 16'h4000;    // 0.5
  localparam logic [R_W-1:0] LAMBDA_EXC  = 22'h018000;  // 3.0
  localparam logic [R_W-1:0] LAMBDA_INH  = 22'h000000;  // 0.0
  localparam logic [P_W-1:0] ALPHA       = 16'h7F00;    // 127/128

  typedef struct packed {
    logic [QOS_W-1:0]  qos;
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
  } qsd_t;

  typedef logic [PORT_W-1:0] port_t;

  typedef struct packed {
    logic [N_PORTS-1:0][W_W-1:0] wp;   // excitation weight into neuron j
    logic [N_PORTS-1:0][W_W-1:0] wm;   // inhibition weight into neuron j
    logic [P_W-1:0]              thr;  // smoothed reward threshold
  } rnn_model_t;

  typedef struct packed {
    port_t primary;
    port_t secondary;
  } decision_t;

  typedef struct packed {
    rnn_model_t model;
    decision_t  dec;
  } tbl_entry_t;

  // ---- router-level packet format (this design's own) ----
  // A packet moves between routers as one parallel word. Its cognitive map
  // (CM) lists the routers visited, each with the reward of the link that
  // led to it, in visiting order for smart packets and reversed for
  // acknowledgments.
  localparam int CM_DEPTH = 8;                    // hops a packet can record
  localparam int LEN_W    = $clog2(CM_DEPTH + 1);

  typedef enum logic [1:0] {
    PKT_DUMB  = 2'd0,
    PKT_SMART = 2'd1,
    PKT_ACK   = 2'd2
  } pkt_type_t;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [P_W-1:0]    reward;
  } cm_entry_t;

  typedef struct packed {
    pkt_type_t                   ptype;
    qsd_t                        qsd;
    logic [LEN_W-1:0]            len;   // valid CM entries
    cm_entry_t [CM_DEPTH-1:0]    cm;
  } packet_t;

endpackage
