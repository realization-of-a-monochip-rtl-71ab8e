// path_ram: the path storage RAM, a three-port memory of 64-bit words (one
// decision word per trellis step) with one write port and two read ports.
//
// As the document asks, a write and two reads complete in one cycle: the
// write is clocked, the two reads are asynchronous, so the traceback can
// follow two consecutive words per cycle. It holds three blocks of up to 64
// words each (192 words at the default truncation length). A read of the
// address being written returns the old word; the traceback never does
// that, since it reads only the two blocks not being written.
module path_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 192
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  output logic [WIDTH-1:0]         rdata_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  output logic [WIDTH-1:0]         rdata_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
