// Shared types, widths and helper functions of the run-time configurable
// 4-parallel radix-2 MDC FFT.
//
// A sample is a complex number of two 32-bit two's-complement fixed-point
// parts, as in the original design's 32-bit fixed-point data. Twiddle
// factors are 25-bit signed with 23 fraction bits (this design's choice: +1,
// -1, +j and -j are exact, and a factor fits the 25-bit port of a typical
// FPGA multiplier). Four samples travel side by side (lanes
// 0..3) every clock. The run-time configuration is log2 of the FFT size
// (4..16), log2 of the number of interleaved streams (0..2), forward/inverse
// and natural/bit-reversed output order.
package hcfft_pkg;

  localparam int DW     = 32;  // bits per real or imaginary part
  localparam int TW     = 25;  // twiddle bits per part
  localparam int TFRAC  = 23;  // twiddle fraction bits (1.0 = 2**TFRAC)
  localparam int LANES  = 4;   // samples per clock (4-parallel)

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW-1:0] re;
    logic signed [TW-1:0] im;
  } twid_t;

  // lane 0 is element [0]
  typedef cplx_t [LANES-1:0] lanes_t;

  // run-time configuration
  typedef struct packed {
    logic [4:0] log2n;    // FFT size N = 2**log2n, 4..16
    logic [1:0] log2s;    // streams S = 2**log2s, 0..2
    logic       inverse;  // 1: inverse FFT
    logic       natural;  // 1: natural output order, 0: bit-reversed
  } cfg_t;

  // saturate a wide signed value to DW bits
  // (it fits when the bits from the sign down to bit DW-1 are all equal)
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [DW+1:0] v);
    if (v[DW+1:DW-1] == '0 || v[DW+1:DW-1] == '1) return v[DW-1:0];
    else if (v[DW+1])                              return {1'b1, {(DW-1){1'b0}}};
    else                                           return {1'b0, {(DW-1){1'b1}}};
  endfunction

  // reverse the low nb bits of v (bits above nb are dropped)
  function automatic logic [31:0] bitrev(input logic [31:0] v, input logic [4:0] nb);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < 32; i++)
      if (i < int'(nb)) r[int'(nb) - 1 - i] = v[i];
    return r;
  endfunction

  // swap lanes 1 and 2 (exchanges the two lane-index bits)
  function automatic lanes_t swap12(input lanes_t x);
    lanes_t y;
    y    = x;
    y[1] = x[2];
    y[2] = x[1];
    return y;
  endfunction

endpackage
