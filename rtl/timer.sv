// timer: produces the decoder's triggering signals from the incoming
// symbol stream and the branch clock.
//
// Symbol side: it counts the received symbol pairs of each codeword (1 pair
// at rates 1/2 and 3/4, 2 at rate 1/4, 4 at rate 1/8) and marks the first
// and the last pair of a codeword for the branch metric unit (first/last
// are combinational, meaningful with pair_valid).
//
// Branch side: it counts trellis steps (step high, one per decoded bit).
// step_idx runs from 0 to lt-1 and is the position inside the current
// path-memory block; wblk (0, 1, 2) is the block being written; warm goes
// high once three whole blocks have been written, when the traceback output
// starts to be meaningful. All three are registered and advance after each
// step. lt is the programmable truncation length, 1 to 64; it should only be
// changed during reset. The grouping into these counters is this design's
// own; the document only says that the timer derives all triggering signals
// from the incoming clock.
module timer
  import vit_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  rate_t           rate,
  input  logic [LT_W-1:0] lt,
  input  logic            pair_valid,
  output logic            first,
  output logic            last,
  input  logic            step,
  output logic [5:0]      step_idx,
  output logic [1:0]      wblk,
  output logic            warm
);
  logic [1:0] pcnt;
  logic [1:0] periods;

  assign first = (pcnt == 2'd0);
  assign last  = (pcnt == 2'(pairs_per_branch(rate) - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt     <= '0;
      step_idx <= '0;
      wblk     <= '0;
      periods  <= '0;
    end else begin
      if (pair_valid) pcnt <= last ? 2'd0 : pcnt + 2'd1;
      if (step) begin
        if (LT_W'(step_idx) >= lt - LT_W'(1)) begin
          step_idx <= '0;
          wblk     <= (wblk == 2'd2) ? 2'd0 : wblk + 2'd1;
          if (periods != 2'd3) periods <= periods + 2'd1;
        end else begin
          step_idx <= step_idx + 6'd1;
        end
      end
    end
  end

  assign warm = (periods == 2'd3);
endmodule
