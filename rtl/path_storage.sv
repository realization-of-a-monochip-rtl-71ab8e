// path_storage: the survivor path memory and its traceback, which turn the
// decision words of the ACS modules into decoded bits.
//
// The three-port RAM holds three blocks of lt words each (block b at
// addresses b*lt .. b*lt+lt-1). During one block period (lt trellis steps)
// the current block is written, one decision word per step, while the two
// other blocks are read backwards twice as fast, two words per step: first
// the block written just before, along an arbitrary path (from state 0)
// that by its end has merged with the survivors, then the block before
// that, whose bits are the decoded ones. Walking back from address
// wblk*lt - 1, modulo 3*lt, visits exactly those two blocks in that order.
//
// At a word with current state s, bit 0 of s is the data bit that led into
// s, and the stored decision d of state s gives the previous state
// {d, s[5:1]} (d = 1: the path came from the upper half, state i+32). The
// two reads of a step are chained in one cycle. Decoded bits are written to
// the reverse buffer at their offset in the block and read out in order
// during the following period.
//
// Timing: on each step (step high, step_idx/wblk from the timer) one word
// is written and two are traced. out_valid/out_bit give one decoded bit per
// step, registered, once warm is high: the bit that entered the trellis at
// step n leaves at step n + 3*lt. The start state 0 and the banked buffer
// are this design's choices.
module path_storage
  import vit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LT_W-1:0]   lt,
  input  logic              step,
  input  logic [5:0]        step_idx,
  input  logic [1:0]        wblk,
  input  logic              warm,
  input  logic [NSTATE-1:0] decisions,
  output logic              out_valid,
  output logic              out_bit
);
  localparam int unsigned DEPTH = 3 * LT_MAX;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [AW-1:0]   waddr, ra0, ra1;
  logic [63:0]     rd0, rd1;
  logic [AW+1:0]   base, l3, q0, q1;
  logic [5:0]      s_in, s_mid, s_out, tb_state;
  logic            dec0_en, dec1_en, bank, rbit;
  logic [5:0]      off0, off1;

  // Address of the q-th word traced back in this period.
  function automatic logic [AW-1:0] tb_addr(input logic [AW+1:0] b,
                                            input logic [AW+1:0] l3x,
                                            input logic [AW+1:0] q);
    logic [AW+1:0] a;
    a = b + l3x - (AW+2)'(1) - q;
    if (a >= l3x) a = a - l3x;
    return AW'(a);
  endfunction

  always_comb begin
    base  = (AW+2)'(wblk) * (AW+2)'(lt);
    l3    = (AW+2)'(3) * (AW+2)'(lt);
    waddr = AW'(base + (AW+2)'(step_idx));
    q0    = (AW+2)'(step_idx) * (AW+2)'(2);
    q1    = q0 + (AW+2)'(1);
    ra0   = tb_addr(base, l3, q0);
    ra1   = tb_addr(base, l3, q1);
    // Words with q >= lt belong to the block being decoded.
    dec0_en = (q0 >= (AW+2)'(lt));
    dec1_en = (q1 >= (AW+2)'(lt));
    off0    = 6'((AW+2)'(2) * (AW+2)'(lt) - (AW+2)'(1) - q0);
    off1    = 6'((AW+2)'(2) * (AW+2)'(lt) - (AW+2)'(1) - q1);
    s_in    = (step_idx == '0) ? 6'd0 : tb_state;
    s_mid   = {rd0[s_in], s_in[5:1]};
    s_out   = {rd1[s_mid], s_mid[5:1]};
  end

  path_ram #(.WIDTH(64), .DEPTH(DEPTH)) u_ram (
    .clk, .we(step), .waddr, .wdata(decisions),
    .raddr_a(ra0), .rdata_a(rd0), .raddr_b(ra1), .rdata_b(rd1)
  );

  reverse_buffer #(.LT_MAX(LT_MAX)) u_rbuf (
    .clk, .wbank(bank),
    .we0(step && dec0_en), .wa0(off0), .wd0(s_in[0]),
    .we1(step && dec1_en), .wa1(off1), .wd1(s_mid[0]),
    .ra(step_idx), .rd(rbit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tb_state  <= '0;
      bank      <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= step && warm;
      if (step) begin
        tb_state <= s_out;
        out_bit  <= rbit;
        if (LT_W'(step_idx) >= lt - LT_W'(1)) bank <= !bank;
      end
    end
  end
endmodule
