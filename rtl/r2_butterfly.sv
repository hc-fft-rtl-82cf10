// Radix-2 butterfly (R2 block) of one MDC stage.
//
// Takes two complex samples a and b in the same clock and returns
//   s = (a + b) / 2   and   d = (a - b) / 2,
// each part rounded to nearest, ties to even (so the rounding adds no bias that
// would pile up over 16 stages), and saturated to DW bits. The divide by two at
// every stage is this design's scaling choice: an N-point transform built from
// log2(N) butterflies therefore returns X[k]/N (forward) or the exact inverse
// DFT (inverse, when the rotators use conjugated twiddles).
// Timing: one register stage, outputs valid one clock after the inputs.
module r2_butterfly
  import hcfft_pkg::*;
(
  input  logic  clk,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t s,
  output cplx_t d
);

  function automatic logic signed [DW-1:0] half_round(input logic signed [DW:0] v);
    logic signed [DW+1:0] w;
    w = $signed({v[DW], v}) >>> 1;
    if (v[0] && w[0]) w = w + (DW+2)'(1);   // tie: go to the even neighbour
    return sat_dw(w);
  endfunction

  always_ff @(posedge clk) begin
    s.re <= half_round((DW+1)'(a.re) + (DW+1)'(b.re));
    s.im <= half_round((DW+1)'(a.im) + (DW+1)'(b.im));
    d.re <= half_round((DW+1)'(a.re) - (DW+1)'(b.re));
    d.im <= half_round((DW+1)'(a.im) - (DW+1)'(b.im));
  end

endmodule
