// conv_encoder: rate-1/2, constraint-length-7 convolutional encoder with
// generator polynomials 133 and 171 (octal).
//
// A six-stage shift register holds the last six input bits (the coder
// state, newest bit in bit 0). The two parity outputs are the modulo-2 sums
// of the register taps selected by the polynomials, including the current
// input bit, so they are combinational in d and the state: {Pn} uses 133,
// {Qn} uses 171, as in the document. On every clock with en high the
// register shifts d in. Reset clears the register (the all-zero state); the
// reset value is this design's choice.
//
// Ports: en/d give the input bit, p/q the parity pair of that bit in the
// same cycle, state the register content.
module conv_encoder
  import vit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       d,
  output logic       p,
  output logic       q,
  output logic [5:0] state
);
  logic [5:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sr <= '0;
    else if (en) sr <= {sr[4:0], d};
  end

  assign {p, q} = code_out(sr, d);
  assign state  = sr;
endmodule
