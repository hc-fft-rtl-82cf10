// Shuffle block: two L-length buffers and two multiplexers.
//
// Over 2L clocks the upper input carries the halves A,B and the lower input
// C,D; the block outputs A,C on the upper output and B,D on the lower output,
// L clocks later. In index terms it exchanges the "which lane" bit of the pair
// with the time bit of weight L. The select bit is 0 for the first L clocks of
// a frame and 1 for the next L, and so on: a phase counter restarts on the
// frame's first word (first_in) and otherwise runs freely, so the tail of a
// frame drains on its own while the input is idle.
//   lower input -> input buffer (L) -> ld
//   output buffer input = sel ? ld : upper input ; upper output = its output
//   lower output        = sel ? upper input : ld
// len (= L, a power of two up to DEPTH) is chosen at run time; this replaces
// the set of fixed shuffle blocks plus a selecting multiplexer by one buffer
// of run-time length. valid/first are delayed by L with the data.
module shuffle
  import hcfft_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter int LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW-1:0] len,
  input  cplx_t         up_in,
  input  cplx_t         lo_in,
  input  logic          valid_in,
  input  logic          first_in,
  output cplx_t         up_out,
  output cplx_t         lo_out,
  output logic          valid_out,
  output logic          first_out
);

  localparam int CW = $clog2(DEPTH) + 1;

  logic [CW-1:0] cnt, cnt_eff;
  logic          sel;
  cplx_t         ld, obuf_in;
  logic [1:0]    side_q;

  always_comb begin
    cnt_eff = first_in ? '0 : cnt;
    sel     = |(cnt_eff & CW'(len));
    obuf_in = sel ? ld : up_in;
    lo_out  = sel ? up_in : ld;
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt_eff + 1'b1;
  end

  delay_line #(.W($bits(cplx_t)), .DEPTH(DEPTH), .LW(LW)) u_inbuf (
    .clk, .rst, .len, .d(lo_in), .q(ld));

  delay_line #(.W($bits(cplx_t)), .DEPTH(DEPTH), .LW(LW)) u_outbuf (
    .clk, .rst, .len, .d(obuf_in), .q(up_out));

  // sideband; reads 0 until the buffer has been filled once after reset
  logic [1:0] side_d;
  assign side_d = {valid_in, first_in};
  delay_line #(.W(2), .ZERO_UNTIL_FILLED(1'b1), .DEPTH(DEPTH), .LW(LW)) u_side (
    .clk, .rst, .len, .d(side_d), .q(side_q));
  assign valid_out = side_q[1];
  assign first_out = side_q[0];

endmodule
