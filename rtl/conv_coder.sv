// conv_coder: the coder half of the chip, rate 1/2, 3/4, 1/4 or 1/8 from
// one constraint-length-7 encoder with polynomials 133 and 171.
//
// Every data bit accepted on in_valid/in_ready goes through conv_encoder and
// gives a parity pair (P, Q). Rate 1/2 sends that pair; rate 3/4 passes the
// pairs through the puncturer (patterns 110 and 101) and sends the punctured
// pairs (R, S); rates 1/4 and 1/8 re-use the same polynomials by sending the
// pair 2 or 4 times, so each output pair is (P, Q) again. The repetition is
// this design's reading of "re-use of the same polynomials"; it keeps the
// four possible codewords that the decoder's branch metric unit expects.
//
// Timing: the output pair appears on out_valid/out_r/out_s one cycle after
// the bit is accepted (two for rate 3/4, where a pair may wait for a second
// punctured symbol). in_ready is low while a pair is being repeated, so rate
// 1/4 takes a bit every second cycle and rate 1/8 every fourth. The rate is
// meant to be changed only during reset.
module conv_coder
  import vit_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  rate_t rate,
  input  logic  in_valid,
  input  logic  in_bit,
  output logic  in_ready,
  output logic  out_valid,
  output logic  out_r,
  output logic  out_s
);
  logic       acc, p, q;
  logic [1:0] rep;           // repetitions still to send after this one
  logic       pv, pr, ps;    // plain (non-punctured) output
  logic       kv, kr, ks;    // punctured output

  assign in_ready = (rep == 2'd0);
  assign acc      = in_valid && in_ready;

  conv_encoder u_enc (
    .clk, .rst_n, .en(acc), .d(in_bit), .p, .q, .state()
  );

  puncturer u_punct (
    .clk, .rst_n, .in_valid(acc && rate == RATE_3_4), .p, .q,
    .out_valid(kv), .r(kr), .s(ks)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep <= '0;
      pv  <= 1'b0;
      pr  <= 1'b0;
      ps  <= 1'b0;
    end else if (acc && rate != RATE_3_4) begin
      pv  <= 1'b1;
      pr  <= p;
      ps  <= q;
      rep <= 2'(pairs_per_branch(rate) - 1);
    end else begin
      pv <= (rep != 2'd0);
      if (rep != 2'd0) rep <= rep - 2'd1;
    end
  end

  assign out_valid = (rate == RATE_3_4) ? kv : pv;
  assign out_r     = (rate == RATE_3_4) ? kr : pr;
  assign out_s     = (rate == RATE_3_4) ? ks : ps;
endmodule
