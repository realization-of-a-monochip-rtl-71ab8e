// reverse_buffer: the output buffer that puts decoded bits back in order.
//
// The traceback finds the bits of a block last-first. They are written at
// their offset inside the block (up to two bits per cycle, ports 0 and 1),
// and read in increasing offset order, one per cycle, during the next block
// period. Two banks of LT_MAX bits alternate: wbank selects the bank being
// written, the other one is read. Writes are clocked, the read is
// combinational. The double banking is this design's choice; the document
// only says that a buffer read backwards restores the initial bit order.
module reverse_buffer #(
  parameter int unsigned LT_MAX = 64
) (
  input  logic                      clk,
  input  logic                      wbank,
  input  logic                      we0,
  input  logic [$clog2(LT_MAX)-1:0] wa0,
  input  logic                      wd0,
  input  logic                      we1,
  input  logic [$clog2(LT_MAX)-1:0] wa1,
  input  logic                      wd1,
  input  logic [$clog2(LT_MAX)-1:0] ra,
  output logic                      rd
);
  logic [LT_MAX-1:0] bank [2];

  always_ff @(posedge clk) begin
    if (we0) bank[wbank][wa0] <= wd0;
    if (we1) bank[wbank][wa1] <= wd1;
  end

  assign rd = bank[!wbank][ra];
endmodule
