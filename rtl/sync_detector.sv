// sync_detector: the fast synchronisation device. It measures how fast the
// least path metric grows and orders a resynchronisation when that speed
// exceeds a threshold.
//
// With the decoder in sync and a usable channel the survivor paths agree
// with the received symbols and the least metric grows slowly; out of sync
// (wrong symbol pairing or puncturing phase) every path disagrees and it
// grows fast. On each trellis step the growth of the least metric since the
// previous step is added up, adding back the 32 that framing removed. After
// WINDOW steps the sum is published on speed (with speed_valid for one
// cycle), and sync_order pulses for one cycle if it is above threshold. The
// speed also maps one-to-one onto Eb/N0 and so serves as a link-quality
// estimate. The measurement principle is the document's; the window length,
// the register widths and the use of a programmable threshold (the document
// sets it from simulations) are this design's choices.
module sync_detector
  import vit_pkg::*;
#(
  parameter int unsigned WINDOW = 128,
  parameter int unsigned SPD_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic [PM_W-1:0]  min_metric,   // least metric before this step
  input  logic             frame,        // framing applied in this step
  input  logic [SPD_W-1:0] threshold,
  output logic [SPD_W-1:0] speed,
  output logic             speed_valid,
  output logic             sync_order
);
  localparam int unsigned WC_W = $clog2(WINDOW + 1);

  logic [PM_W-1:0]  min_prev;
  logic             frame_prev;
  logic [SPD_W-1:0] acc, acc_nxt;
  logic [WC_W-1:0]  wcnt;
  logic [PM_W:0]    growth;

  // True growth since the previous step: framing lowered every metric by 32.
  assign growth  = {1'b0, min_metric} - {1'b0, min_prev}
                 + (frame_prev ? (PM_W+1)'(FRAME_TH) : '0);
  assign acc_nxt = acc + SPD_W'(growth);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_prev    <= '0;
      frame_prev  <= 1'b0;
      acc         <= '0;
      wcnt        <= '0;
      speed       <= '0;
      speed_valid <= 1'b0;
      sync_order  <= 1'b0;
    end else begin
      speed_valid <= 1'b0;
      sync_order  <= 1'b0;
      if (step) begin
        min_prev   <= min_metric;
        frame_prev <= frame;
        if (wcnt == WC_W'(WINDOW - 1)) begin
          wcnt        <= '0;
          acc         <= '0;
          speed       <= acc_nxt;
          speed_valid <= 1'b1;
          sync_order  <= (acc_nxt > threshold);
        end else begin
          wcnt <= wcnt + 1'b1;
          acc  <= acc_nxt;
        end
      end
    end
  end
endmodule
