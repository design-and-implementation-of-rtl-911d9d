// weight_storage_table: dual-port store of the RNN models, one per QSD.
//
// A CAM of QSD keys selects a word of a RAM that holds, per model, the 2n
// weights, the threshold and the two best output ports. Port 1 is
// read-only and serves smart packets: start1 with qsd1 returns hit1 and the
// port decision on dout1 when done1 pulses. Port 2 serves the learning
// component: start2 with read2 high returns hit2 and the model on dout2;
// with read2 low it writes din2 (model and decision) for qsd2, creating the
// entry on a miss. The two ports have separate controllers and may work in
// the same cycle (read/read or read/write). Both finish two clock edges
// after start. Keys and data are sampled at start; QSD inputs must stay
// stable until done. Structure (table controllers, CAM, RAM) and sizes
// (16 x 68-bit CAM, 16 models) follow the reference design.
module weight_storage_table
  import cpn_pkg::*;
#(
  parameter int DEPTH = TBL_DEPTH
) (
  input  logic               clk,
  input  logic               rst_n,
  // port 1: smart packets
  input  logic               start1,
  input  qsd_t               qsd1,
  output logic               done1,
  output logic               hit1,
  output decision_t          dout1,
  // port 2: reinforcement learning
  input  logic               start2,
  input  logic               read2,
  input  qsd_t               qsd2,
  input  tbl_entry_t         din2,
  output logic               done2,
  output logic               hit2,
  output rnn_model_t         dout2
);
  logic [DEPTH-1:0] match1, match2, valid, wl1, wl2;
  logic             rd1, rd2, we2, cam_we;

  qsd_cam #(.DEPTH(DEPTH), .KEY_W(QSD_W)) u_cam (
    .clk, .rst_n,
    .key1(qsd1), .match1,
    .key2(qsd2), .match2,
    .we(cam_we), .wsel(wl2), .wkey(qsd2), .valid
  );

  wst_ram #(.DEPTH(DEPTH), .WIDTH(ENTRY_W), .DEC_OUT(DEC_W)) u_ram (
    .clk, .rst_n,
    .wl1, .rd1, .dout1,
    .wl2, .rd2, .we2, .din2, .dout2
  );

  sp_table_ctrl #(.DEPTH(DEPTH)) u_sp_ctrl (
    .clk, .rst_n, .start(start1), .cam_match(match1),
    .ram_wl(wl1), .ram_rd(rd1), .done(done1), .hit(hit1)
  );

  ack_table_ctrl #(.DEPTH(DEPTH)) u_ack_ctrl (
    .clk, .rst_n, .start(start2), .read(read2),
    .cam_match(match2), .cam_valid(valid), .cam_we,
    .ram_wl(wl2), .ram_rd(rd2), .ram_we(we2), .done(done2), .hit(hit2)
  );
endmodule
