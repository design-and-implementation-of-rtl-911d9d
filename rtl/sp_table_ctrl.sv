// sp_table_ctrl: controller of table port 1, the read-only smart packet port.
//
// On 'start' it latches the CAM match lines for the key on port 1 and their
// OR (the hit), then asks the RAM for the word on the next cycle and raises
// 'done' for one cycle with 'hit'. Timing: start sampled at edge 0, RAM
// read at edge 1, done high after edge 2 with the decision already on the
// RAM output. A start while busy is ignored. The split into a search and a
// read cycle is this design's choice.
module sp_table_ctrl
  import cpn_pkg::*;
#(
  parameter int DEPTH = TBL_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DEPTH-1:0] cam_match,
  output logic [DEPTH-1:0] ram_wl,
  output logic             ram_rd,
  output logic             done,
  output logic             hit
);
  typedef enum logic [1:0] {IDLE, READ} state_t;
  state_t state;

  assign ram_rd = (state == READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      ram_wl <= '0;
      done   <= 1'b0;
      hit    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          ram_wl <= cam_match;
          hit    <= |cam_match;
          state  <= READ;
        end
        READ: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
