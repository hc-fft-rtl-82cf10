// Self-checking test of rotator: random samples times random and exact
// (+1, -1, +j, -j) twiddles, forward and inverse (conjugated twiddle).
// The expected product is computed in floating point and rounded; results
// must match within 1 LSB (exact twiddles: exactly), one clock after the
// inputs.
module tb_rotator;
  import hcfft_pkg::*;

  logic  clk = 1'b0;
  logic  inverse;
  cplx_t x, y;
  twid_t w;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  rotator dut (.clk, .inverse, .x, .w, .y);

  localparam longint MAXV = (longint'(1) <<< (DW-1)) - 1;
  localparam longint MINV = -(longint'(1) <<< (DW-1));
  localparam int     ONE  = 2**TFRAC;          // twiddle value of 1.0

  function automatic longint clip(input real v);
    longint r;
    r = longint'($floor(v + 0.5));
    if (r > MAXV) r = MAXV;
    if (r < MINV) r = MINV;
    return r;
  endfunction

  // random sample part, up to half of full scale
  function automatic longint rnd();
    logic signed [DW-1:0] v;
    v = DW'({$urandom, $urandom});
    return longint'(v) >>> 1;
  endfunction

  task automatic apply(input longint xr, input longint xi, input int wr, input int wi,
                       input bit inv, input int tol);
    real er, ei, wim;
    x.re = DW'(xr); x.im = DW'(xi); w.re = TW'(wr); w.im = TW'(wi); inverse = inv;
    wim = inv ? -real'(wi) : real'(wi);
    er = (real'(xr) * real'(wr) - real'(xi) * wim) / real'(ONE);
    ei = (real'(xr) * wim + real'(xi) * real'(wr)) / real'(ONE);
    @(posedge clk); #1;
    checks += 2;
    if (longint'(y.re) > clip(er) + tol || longint'(y.re) < clip(er) - tol) begin
      failures++; $display("re: x=(%0d,%0d) w=(%0d,%0d) inv=%0d got %0d exp %f", xr, xi, wr, wi, inv, y.re, er);
    end
    if (longint'(y.im) > clip(ei) + tol || longint'(y.im) < clip(ei) - tol) begin
      failures++; $display("im: x=(%0d,%0d) w=(%0d,%0d) inv=%0d got %0d exp %f", xr, xi, wr, wi, inv, y.im, ei);
    end
  endtask

  initial begin
    x = '0; w = '0; inverse = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      longint xr, xi;
      xr = rnd();
      xi = rnd();
      apply(xr, xi, ONE, 0, 0, 0);
      apply(xr, xi, -ONE, 0, 1, 0);
      apply(xr, xi, 0, -ONE, 0, 0);
      apply(xr, xi, 0, ONE, 1, 0);
    end
    for (int i = 0; i < 2000; i++) begin
      real ang;
      ang = real'($urandom_range(65535)) * 2.0 * 3.14159265358979 / 65536.0;
      apply(rnd(), rnd(),
            int'($floor($cos(ang) * real'(ONE) + 0.5)), int'($floor(-$sin(ang) * real'(ONE) + 0.5)),
            1'($urandom_range(1)), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
