// depuncturer: restores rate-1/2 codewords from the received rate-3/4 soft
// symbol pairs by putting erasures back where the coder deleted symbols.
//
// It mirrors the puncturer: of every two received pairs (R, S), the first
// gives the full branch (Pn, Qn); the second gives Pn+1 with Qn+1 erased,
// and its S symbol is held back to give the third branch (Pn+2 erased,
// Qn+2). An erased symbol carries its erasure flag and a zero value; the
// branch metric unit gives it no weight. While it emits that third branch
// the unit takes no input (in_ready low). At the other rates pairs pass
// through unchanged, never erased.
//
// Timing: one registered output pair (out_valid, out) per accepted input
// pair, one cycle later, plus the extra branch in rate 3/4. The puncturing
// phase restarts at reset; the erasure flag format and the ready signal are
// this design's choices.
module depuncturer
  import vit_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  rate_t            rate,
  input  logic             in_valid,
  input  logic [SYM_W-1:0] in_r,
  input  logic [SYM_W-1:0] in_s,
  output logic             in_ready,
  output logic             out_valid,
  output sym_pair_t        out
);
  logic [1:0]       phase;
  logic [SYM_W-1:0] held_s;
  logic             punct;

  assign punct    = (rate == RATE_3_4);
  assign in_ready = !(punct && phase == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      held_s    <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!punct) begin
        phase <= '0;
        if (in_valid) begin
          out_valid <= 1'b1;
          out       <= '{p: in_r, q: in_s, p_era: 1'b0, q_era: 1'b0};
        end
      end else begin
        unique case (phase)
          2'd0: if (in_valid) begin
            out_valid <= 1'b1;
            out       <= '{p: in_r, q: in_s, p_era: 1'b0, q_era: 1'b0};
            phase     <= 2'd1;
          end
          2'd1: if (in_valid) begin
            out_valid <= 1'b1;
            out       <= '{p: in_r, q: '0, p_era: 1'b0, q_era: 1'b1};
            held_s    <= in_s;
            phase     <= 2'd2;
          end
          default: begin
            out_valid <= 1'b1;
            out       <= '{p: '0, q: held_s, p_era: 1'b1, q_era: 1'b0};
            phase     <= 2'd0;
          end
        endcase
      end
    end
  end
endmodule
