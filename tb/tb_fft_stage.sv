// Self-checking test of fft_stage at K = 6: the first stage (STAGE = 1), a
// middle stage (STAGE = 3) and the last stage (STAGE = 6) get the same random
// frames. Each lane pair must give (a+b)/2 on the upper lane and
// (a-b)/2 * W on the lower lane two clocks later, with W computed here:
//   stage 1: lane 1 W_N^i, lane 3 W_N^(i+N/4), i = t >> log2s
//   stage k: W_(2**(K+1-k))^(i mod 2**(K-k)),  stage K: 1
// (conjugated for the inverse). Tolerance 1.5 LSB plus the twiddle
// quantisation, |a-b|/2 * 2**-(TFRAC+1) per part. Frames: N = 64 forward,
// N = 32 with two streams inverse, N = 16 with four streams forward.
module tb_fft_stage;
  import hcfft_pkg::*;

  localparam int TK = 6;

  logic   clk = 1'b0, rst = 1'b1;
  cfg_t   cfg;
  lanes_t din, d1, d3, d6;
  logic   valid_in = 1'b0, first_in = 1'b0;
  logic   v1, f1, v3, f3, v6, f6;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft_stage #(.K(TK), .STAGE(1)) u1 (.clk, .rst, .cfg, .din, .valid_in, .first_in,
    .dout(d1), .valid_out(v1), .first_out(f1));
  fft_stage #(.K(TK), .STAGE(3)) u3 (.clk, .rst, .cfg, .din, .valid_in, .first_in,
    .dout(d3), .valid_out(v3), .first_out(f3));
  fft_stage #(.K(TK), .STAGE(TK)) u6 (.clk, .rst, .cfg, .din, .valid_in, .first_in,
    .dout(d6), .valid_out(v6), .first_out(f6));

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // expected lower output: (a-b)/2 times W_(2**lg)^e (conjugated if inv)
  task automatic chk_lower(input cplx_t a, input cplx_t b, input int lg, input int e,
                           input bit inv, input cplx_t got, input string what);
    real dr, di, ang, c, s, er, ei, tol;
    dr = (real'(a.re) - real'(b.re)) / 2.0;
    di = (real'(a.im) - real'(b.im)) / 2.0;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(2**lg);
    c = $cos(ang); s = inv ? $sin(ang) : -$sin(ang);
    er = dr * c - di * s;
    ei = dr * s + di * c;
    // rounding of the sum (1/2), of the product (1/2) and of the stored
    // twiddle (1/2 LSB of 2**-TFRAC per part)
    tol = 1.5 + (rabs(dr) + rabs(di)) / real'(2**(TFRAC + 1));
    checks++;
    if (rabs(real'(got.re) - er) > tol || rabs(real'(got.im) - ei) > tol) begin
      failures++;
      if (failures < 20) $display("%s: got (%0d,%0d) expected (%f,%f)", what, got.re, got.im, er, ei);
    end
  endtask

  task automatic chk_upper(input cplx_t a, input cplx_t b, input cplx_t got, input string what);
    real er, ei;
    er = (real'(a.re) + real'(b.re)) / 2.0;
    ei = (real'(a.im) + real'(b.im)) / 2.0;
    checks++;
    if (rabs(real'(got.re) - er) > 1.0 || rabs(real'(got.im) - ei) > 1.0) begin
      failures++;
      if (failures < 20) $display("%s: got (%0d,%0d) expected (%f,%f)", what, got.re, got.im, er, ei);
    end
  endtask

  task automatic run(input int ln, input int ls, input bit inv);
    int m, n;
    lanes_t hist [$];
    cfg.log2n = 5'(ln); cfg.log2s = 2'(ls); cfg.inverse = inv; cfg.natural = 1'b1;
    n = 1 << ln;
    m = (1 << ls) * n;
    @(negedge clk);
    for (int t = 0; t < m/4 + 2; t++) begin
      lanes_t x;
      for (int l = 0; l < 4; l++) begin
        x[l].re = DW'(int'($urandom) >>> 1);
        x[l].im = DW'(int'($urandom) >>> 1);
      end
      hist.push_back(x);
      din      <= x;
      valid_in <= (t < m/4);
      first_in <= (t == 0);
      @(negedge clk);
      if (t >= 1 && t <= m/4) begin
        int tt, i;
        lanes_t a;
        tt = t - 1;
        a  = hist[tt];
        i  = tt >> ls;
        checks += 3;
        if (!(v1 && v3 && v6) || ((f1 && f3 && f6) != (tt == 0))) begin
          failures++;
          $display("valid/first wrong at t=%0d", tt);
        end
        chk_upper(a[0], a[1], d1[0], "stage1 lane0");
        chk_upper(a[2], a[3], d1[2], "stage1 lane2");
        chk_lower(a[0], a[1], ln, i, inv, d1[1], "stage1 lane1");
        chk_lower(a[2], a[3], ln, i + n/4, inv, d1[3], "stage1 lane3");
        chk_upper(a[0], a[1], d3[0], "stage3 lane0");
        chk_lower(a[0], a[1], TK + 1 - 3, i % (2**(TK-3)), inv, d3[1], "stage3 lane1");
        chk_lower(a[2], a[3], TK + 1 - 3, i % (2**(TK-3)), inv, d3[3], "stage3 lane3");
        chk_upper(a[2], a[3], d6[2], "stage6 lane2");
        chk_lower(a[0], a[1], 1, 0, inv, d6[1], "stage6 lane1");
        chk_lower(a[2], a[3], 1, 0, inv, d6[3], "stage6 lane3");
      end
    end
    valid_in <= 1'b0;
    @(negedge clk);
  endtask

  initial begin
    din = '0;
    cfg = '0;
    cfg.log2n = 5'd6;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(6, 0, 1'b0);
    run(5, 1, 1'b1);
    run(4, 2, 1'b0);
    run(4, 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
