// ack_table_ctrl: controller of table port 2, the read/write port used by
// the reinforcement learning component.
//
// On 'start' it latches the CAM match lines for the key on port 2. With
// 'read' high it reads the RAM word and raises 'done' with 'hit' two edges
// after start, like port 1. With 'read' low it writes: on a hit the matching
// word is overwritten; on a miss a word is allocated, the first free one or,
// when all 16 are in use, the one a round-robin pointer names, and both the
// CAM key and the RAM word are written. 'done' then follows one edge after
// the write, and 'hit' tells whether the model already existed. The
// replacement policy is this design's choice; the reference is silent on it.
module ack_table_ctrl
  import cpn_pkg::*;
#(
  parameter int DEPTH = TBL_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             read,
  input  logic [DEPTH-1:0] cam_match,
  input  logic [DEPTH-1:0] cam_valid,
  output logic             cam_we,
  output logic [DEPTH-1:0] ram_wl,
  output logic             ram_rd,
  output logic             ram_we,
  output logic             done,
  output logic             hit
);
  typedef enum logic [1:0] {IDLE, READ, WRITE} state_t;
  state_t state;
  logic [$clog2(DEPTH)-1:0] rr_ptr;
  logic [DEPTH-1:0]         alloc;

  // First free word, else the round-robin victim.
  always_comb begin
    alloc = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!cam_valid[i]) alloc = DEPTH'(1) << i;
    if (&cam_valid) alloc = DEPTH'(1) << rr_ptr;
  end

  assign ram_rd = (state == READ);
  assign ram_we = (state == WRITE);
  assign cam_we = (state == WRITE) && !hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      ram_wl <= '0;
      done   <= 1'b0;
      hit    <= 1'b0;
      rr_ptr <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          hit <= |cam_match;
          if (read) begin
            ram_wl <= cam_match;
            state  <= READ;
          end else begin
            ram_wl <= (|cam_match) ? cam_match : alloc;
            if (!(|cam_match) && (&cam_valid)) rr_ptr <= rr_ptr + 1'b1;
            state  <= WRITE;
          end
        end
        READ, WRITE: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
