// viterbi_decoder: soft-decision Viterbi decoder for the K=7 (133, 171)
// code at rates 1/2, 3/4 (punctured), 1/4 and 1/8 (repeated).
//
// Chain: de-puncturer -> branch metric unit -> path metric computer (32 ACS
// modules, one trellis step per clock at most) -> path storage RAM with
// traceback and reversing buffer. The timer derives the pair grouping and
// the block counters; the synchronisation device watches the least path
// metric.
//
// Interface: received soft-symbol pairs (3-bit, offset binary, 0 = certain
// '0', 7 = certain '1') arrive on in_valid/in_r/in_s and are taken when
// in_ready is high (low one cycle in three at rate 3/4 while an erased
// branch is produced). Decoded bits leave on out_valid/out_bit, one per
// trellis step. lt is the truncation length (1..64), rate the code rate;
// change both only during reset. sync_order pulses when the least metric
// grows faster than sync_threshold over a window; speed is that growth
// (link-quality estimate).
//
// Timing: a bit leaves 3*lt trellis steps after the step its codeword
// completed, plus a pipeline of a few clocks (de-puncturer, branch metric
// and output registers). The structure is the document's; widths of the
// interface and the handshake are this design's.
module viterbi_decoder
  import vit_pkg::*;
#(
  parameter int unsigned SYNC_WINDOW = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rate_t            rate,
  input  logic [LT_W-1:0]  lt,
  input  logic [15:0]      sync_threshold,
  input  logic             in_valid,
  input  logic [SYM_W-1:0] in_r,
  input  logic [SYM_W-1:0] in_s,
  output logic             in_ready,
  output logic             out_valid,
  output logic             out_bit,
  output logic             sync_order,
  output logic [15:0]      speed,
  output logic             speed_valid
);
  sym_pair_t         pair;
  logic              pair_valid, first, last, step, frame, warm;
  bm_vec_t           bm;
  logic [NSTATE-1:0] decisions;
  logic [PM_W-1:0]   min_metric;
  logic [5:0]        step_idx;
  logic [1:0]        wblk;

  depuncturer u_depunct (
    .clk, .rst_n, .rate, .in_valid, .in_r, .in_s, .in_ready,
    .out_valid(pair_valid), .out(pair)
  );

  timer u_timer (
    .clk, .rst_n, .rate, .lt, .pair_valid, .first, .last,
    .step, .step_idx, .wblk, .warm
  );

  branch_metric u_bmu (
    .clk, .rst_n, .rate, .in_valid(pair_valid), .in_pair(pair),
    .first, .last, .bm_valid(step), .bm
  );

  path_metric_unit u_pmu (
    .clk, .rst_n, .step, .bm, .decisions, .frame, .min_metric
  );

  path_storage u_ps (
    .clk, .rst_n, .lt, .step, .step_idx, .wblk, .warm, .decisions,
    .out_valid, .out_bit
  );

  sync_detector #(.WINDOW(SYNC_WINDOW), .SPD_W(16)) u_sync (
    .clk, .rst_n, .step, .min_metric, .frame, .threshold(sync_threshold),
    .speed, .speed_valid, .sync_order
  );
endmodule
