// vit_pkg: types, constants and small functions shared by the convolutional
// coder and the Viterbi decoder.
//
// The code is the constraint-length-7, rate-1/2 code with generator
// polynomials 133 and 171 (octal). The coder state is the content of its
// six-stage shift register, with the newest input bit in bit 0, so that a
// state s followed by input bit b goes to state (2s + b) mod 64: states i and
// i+32 both lead to states 2i and 2i+1, the butterfly the decoder's ACS
// modules are built around. In a generator polynomial the most significant
// octal digit taps the current input bit and the least significant one taps
// the bit that entered six steps earlier.
//
// Soft symbols are 3-bit offset-binary values: 0 is a certain '0', 7 a
// certain '1'. The rate codes and the derived-rate scheme (repetition of the
// P/Q pair for rates 1/4 and 1/8) are this design's reading of the code
// family; the numbers K, polynomials, 64 states, 8-bit metrics, framing
// threshold 32 and truncation length up to 64 are the document's.
package vit_pkg;

  localparam int K        = 7;            // constraint length
  localparam int NSTATE   = 1 << (K - 1); // 64 trellis states
  localparam int NACS     = NSTATE / 2;   // 32 ACS modules, one butterfly each
  localparam logic [6:0] G_P = 7'o133;    // polynomial giving {Pn}
  localparam logic [6:0] G_Q = 7'o171;    // polynomial giving {Qn}
  localparam int SYM_W    = 3;            // soft-decision quantisation
  localparam int BM_W     = 5;            // branch metric width (max 28)
  localparam int PM_W     = 8;            // path metric width (one byte)
  localparam int FRAME_TH = 32;           // framing threshold
  localparam int LT_MAX   = 64;           // largest truncation length
  localparam int LT_W     = 7;            // width of a truncation length 1..64

  // Coding rate selection, shared by coder and decoder.
  typedef enum logic [1:0] {
    RATE_1_2 = 2'd0,
    RATE_3_4 = 2'd1,
    RATE_1_4 = 2'd2,
    RATE_1_8 = 2'd3
  } rate_t;

  // One received pair of soft symbols, with erasure flags set for the
  // places the de-puncturer filled in.
  typedef struct packed {
    logic [SYM_W-1:0] p;
    logic [SYM_W-1:0] q;
    logic             p_era;
    logic             q_era;
  } sym_pair_t;

  // Branch metrics of the four codewords {P,Q} = 00, 01, 10, 11,
  // indexed by {P,Q}.
  typedef logic [BM_W-1:0] bm_vec_t [4];

  // Reverses the 7 bits so the octal-notation polynomial lines up with a
  // window whose bit 0 is the current input bit.
  function automatic logic [6:0] rev7(input logic [6:0] v);
    for (int k = 0; k < 7; k++) rev7[k] = v[6-k];
  endfunction

  // Coder output pair {P,Q} for input bit b leaving state s.
  function automatic logic [1:0] code_out(input logic [5:0] s, input logic b);
    logic [6:0] w;
    w = {s, b};                     // w[k] = input bit k steps ago
    code_out = {^(w & rev7(G_P)), ^(w & rev7(G_Q))};
  endfunction

  // Number of received symbol pairs per trellis branch.
  function automatic int unsigned pairs_per_branch(input rate_t r);
    case (r)
      RATE_1_4: pairs_per_branch = 2;
      RATE_1_8: pairs_per_branch = 4;
      default:  pairs_per_branch = 1;
    endcase
  endfunction

endpackage
