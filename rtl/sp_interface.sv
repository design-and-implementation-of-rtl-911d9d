// sp_interface: chooses the output port of a smart packet.
//
// On 'start' (the QSD is applied to table port 1 at the same time) it
// starts a table search. On a hit it takes the stored primary and secondary
// ports; on a miss it draws a random primary port from a free-running
// 16-bit LFSR and uses the next port as secondary. It then checks the
// candidates in turn: a candidate is accepted when its link is up and it is
// not the port the packet came in on. The order is primary, secondary, then
// all ports counting up from a random one. If no port passes, the
// incoming port is used. The result is put on 'out_port' and 'done' pulses
// for one cycle; 'out_port' holds until the next request.
//
// Timing: with the first candidate accepted, done rises within six cycles of
// start, the service time of the reference design; each rejected candidate
// adds two cycles. The state sequence
// follows the reference state diagram; the candidate order after the
// secondary, the LFSR and the secondary on a miss are this design's choices.
module sp_interface
  import cpn_pkg::*;
#(
  parameter int N = N_PORTS,
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [$clog2(N)-1:0] inc_port,
  input  logic [N-1:0]         link_up,
  output logic                 done,
  output logic [$clog2(N)-1:0] out_port,
  // table port 1
  output logic                 tbl_start,
  input  logic                 tbl_done,
  input  logic                 tbl_hit,
  input  logic [$clog2(N)-1:0] tbl_primary,
  input  logic [$clog2(N)-1:0] tbl_secondary
);
  localparam int PW = $clog2(N);
  typedef enum logic [2:0] {
    S_INIT, S_WAIT, S_SEARCH, S_READ, S_RANDOM, S_VERIFY, S_NEXT, S_ASSERT
  } state_t;

  state_t         state;
  logic [15:0]    lfsr;
  logic [PW-1:0]  inc_q, secondary, cand, rbase;
  logic [$clog2(N+3)-1:0] tries;
  logic           cand_ok;

  assign tbl_start = (state == S_WAIT) && start;
  assign cand_ok   = link_up[cand] && (cand != inc_q);

  // x^16 + x^14 + x^13 + x^11 + 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= LFSR_SEED;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_INIT;
      done      <= 1'b0;
      out_port  <= '0;
      inc_q     <= '0;
      secondary <= '0;
      rbase     <= '0;
      cand      <= '0;
      tries     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_INIT:   state <= S_WAIT;
        S_WAIT:   if (start) begin
          inc_q <= inc_port;
          state <= S_SEARCH;
        end
        S_SEARCH: if (tbl_done) state <= tbl_hit ? S_READ : S_RANDOM;
        S_READ: begin
          secondary <= tbl_secondary;
          cand      <= tbl_primary;
          rbase     <= PW'(32'(lfsr[15:8]) % N);
          tries     <= '0;
          state     <= S_VERIFY;
        end
        S_RANDOM: begin
          secondary <= PW'((32'(lfsr) + 32'd1) % N);
          cand      <= PW'(32'(lfsr) % N);
          rbase     <= PW'(32'(lfsr[15:8]) % N);
          tries     <= '0;
          state     <= S_VERIFY;
        end
        S_VERIFY: begin
          if (cand_ok) begin
            out_port <= cand;
            done     <= 1'b1;
            state    <= S_ASSERT;
          end else if (tries == ($bits(tries))'(N + 1)) begin
            out_port <= inc_q;   // every other port is unusable
            done     <= 1'b1;
            state    <= S_ASSERT;
          end else begin
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          tries <= tries + 1'b1;
          if (tries == '0) cand <= secondary;
          else             cand <= PW'((32'(rbase) + 32'(tries) - 32'd1) % N);
          state <= S_VERIFY;
        end
        S_ASSERT: state <= S_WAIT;
        default:  state <= S_WAIT;
      endcase
    end
  end
endmodule
