// Rotator: multiplies a complex sample by a twiddle factor W (the "x" symbol
// on the lower branch of each butterfly).
//
//   y = x * W            forward transform
//   y = x * conj(W)      inverse transform (inverse = 1)
//
// Twiddles are TW-bit signed with TFRAC fraction bits; the product is rounded
// (half up) back to DW bits per part and saturated. Conjugating the twiddles
// is how this design provides the inverse FFT; the flow of data is the same
// in both modes.
// Timing: one register stage, y valid one clock after x and w.
module rotator
  import hcfft_pkg::*;
(
  input  logic  clk,
  input  logic  inverse,
  input  cplx_t x,
  input  twid_t w,
  output cplx_t y
);

  localparam int PW = DW + TW + 1;

  logic signed [TW-1:0] wim;
  logic signed [PW-1:0] pre, pim;

  always_comb begin
    wim = inverse ? -w.im : w.im;
    pre = PW'(x.re * w.re) - PW'(x.im * wim);
    pim = PW'(x.re * wim)  + PW'(x.im * w.re);
  end

  function automatic logic signed [DW-1:0] scale(input logic signed [PW-1:0] p);
    logic signed [PW-1:0] r;
    r = (p + (PW'(1) <<< (TFRAC-1))) >>> TFRAC;
    if (r[PW-1:DW-1] == '0 || r[PW-1:DW-1] == '1) return r[DW-1:0];
    else if (r[PW-1])                              return {1'b1, {(DW-1){1'b0}}};
    else                                           return {1'b0, {(DW-1){1'b1}}};
  endfunction

  always_ff @(posedge clk) begin
    y.re <= scale(pre);
    y.im <= scale(pim);
  end

endmodule
