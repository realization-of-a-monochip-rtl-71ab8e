// codec_top: the single-chip convolutional coder and Viterbi decoder.
//
// The coder and the decoder are independent halves sharing only the clock
// and reset: a modem sends with the coder and receives with the decoder.
// Each has its own rate selection (1/2, 3/4, 1/4, 1/8), which is this
// design's choice; the document gives one chip carrying both functions.
//
// Coder: data bits on cod_in_valid/cod_in_bit (taken while cod_in_ready),
// code pairs out on cod_out_valid/cod_out_r/cod_out_s (R = P and S = Q
// except at rate 3/4).
// Decoder: 3-bit soft pairs on dec_in_valid/dec_in_r/dec_in_s (taken while
// dec_in_ready), decoded bits on dec_out_valid/dec_out_bit, lt the
// truncation length (up to 64), sync_order and link_speed from the
// synchronisation device.
module codec_top
  import vit_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // coder
  input  rate_t            cod_rate,
  input  logic             cod_in_valid,
  input  logic             cod_in_bit,
  output logic             cod_in_ready,
  output logic             cod_out_valid,
  output logic             cod_out_r,
  output logic             cod_out_s,
  // decoder
  input  rate_t            dec_rate,
  input  logic [LT_W-1:0]  dec_lt,
  input  logic [15:0]      sync_threshold,
  input  logic             dec_in_valid,
  input  logic [SYM_W-1:0] dec_in_r,
  input  logic [SYM_W-1:0] dec_in_s,
  output logic             dec_in_ready,
  output logic             dec_out_valid,
  output logic             dec_out_bit,
  output logic             sync_order,
  output logic [15:0]      link_speed,
  output logic             link_speed_valid
);
  conv_coder u_coder (
    .clk, .rst_n, .rate(cod_rate),
    .in_valid(cod_in_valid), .in_bit(cod_in_bit), .in_ready(cod_in_ready),
    .out_valid(cod_out_valid), .out_r(cod_out_r), .out_s(cod_out_s)
  );

  viterbi_decoder u_decoder (
    .clk, .rst_n, .rate(dec_rate), .lt(dec_lt), .sync_threshold,
    .in_valid(dec_in_valid), .in_r(dec_in_r), .in_s(dec_in_s),
    .in_ready(dec_in_ready), .out_valid(dec_out_valid), .out_bit(dec_out_bit),
    .sync_order, .speed(link_speed), .speed_valid(link_speed_valid)
  );
endmodule
