// puncturer: turns the rate-1/2 parity streams {Pn},{Qn} into the rate-3/4
// streams {Rn},{Sn}.
//
// Following the document's coder drawing, each stream goes into a FIFO, and
// the FIFO of {Pn} takes its input under the shift-in pattern 110 while the
// FIFO of {Qn} takes its input under 101 (deletion pattern 110,101). Of
// three consecutive input pairs, P is kept for the first two and Q for the
// first and third, giving
//   {Rn} = (Pn, Pn+1, Pn+3, Pn+4, ...),  {Sn} = (Qn, Qn+2, Qn+3, Qn+5, ...).
// Whenever both FIFOs hold a symbol, one is taken from each and presented as
// an output pair (r, s) with out_valid high for one cycle, the cycle after
// they were taken. Three input pairs thus give two output pairs.
//
// Interface: in_valid/p/q one parity pair per data bit; out_valid/r/s.
// The pattern phase restarts at reset. FIFO depth 4 and the output timing
// are this design's choices.
module puncturer (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic p,
  input  logic q,
  output logic out_valid,
  output logic r,
  output logic s
);
  localparam logic [2:0] PAT_P = 3'b110;   // leftmost digit = first pair
  localparam logic [2:0] PAT_Q = 3'b101;

  logic [1:0] phase;
  logic       keep_p, keep_q;
  logic       r_head, s_head, r_empty, s_empty, take;

  assign keep_p = PAT_P[2 - phase];
  assign keep_q = PAT_Q[2 - phase];
  assign take   = !r_empty && !s_empty;

  sync_fifo #(.DEPTH(4), .W(1)) u_fifo_r (
    .clk, .rst_n, .push(in_valid && keep_p), .din(p), .pop(take),
    .dout(r_head), .empty(r_empty), .full()
  );
  sync_fifo #(.DEPTH(4), .W(1)) u_fifo_s (
    .clk, .rst_n, .push(in_valid && keep_q), .din(q), .pop(take),
    .dout(s_head), .empty(s_empty), .full()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
      r         <= 1'b0;
      s         <= 1'b0;
    end else begin
      if (in_valid) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      out_valid <= take;
      if (take) begin
        r <= r_head;
        s <= s_head;
      end
    end
  end
endmodule
