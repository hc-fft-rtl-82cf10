// Self-checking test of fft_pipeline (K = 6 stages, up to 64 points).
// Frames are fed in first-stage order (lane 0 x[i], lane 1 x[i+N/2], lane 2
// x[i+N/4], lane 3 x[i+3N/4] of stream s at clock i*S + s). At output clock t
// lane {l1,l0} must hold bin k = bitrev_n(l1*2**(n-1) + (t>>log2s)*2 + l0) of
// stream t mod S: X[k]/N forward, the inverse DFT otherwise, computed here by
// a direct DFT, tolerance 4 LSB plus twiddle quantisation, and average
// relative error below 1e-5. Sizes 64, 16 (stages bypassed), 32 with two
// streams, 16 with four streams, then 64 again (no stale frame may appear),
// each twice back to back. Latency 2*log2n + S*N/4 - S clocks.
module tb_fft_pipeline;
  import hcfft_pkg::*;

  localparam int TK = 6;
  localparam int MM = 2**TK;

  logic   clk = 1'b0, rst = 1'b1;
  cfg_t   cfg;
  lanes_t din, dout;
  logic   valid_in = 1'b0, first_in = 1'b0, valid_out, first_out;
  int     checks = 0, failures = 0, cyc = 0, orow = 0, nfo = 0, nfi = 0;

  // Error budget: 4 LSB of rounding plus the twiddle quantisation, which
  // grows with the number of stages (inputs span +-2**(DW-2)). As in the
  // reference comparison of the original design, the average relative error
  // |got - exp| / |exp| over all checked outputs must stay below 1e-5.
  real rel_sum = 0.0;
  int  rel_cnt = 0;
  function automatic real tol_for(input int ln);
    return 4.0 + real'(ln) * real'(2**(DW - 2 - TFRAC));
  endfunction
  function automatic void rel_acc(input real gr, input real gi, input real er, input real ei);
    real mag;
    mag = $sqrt(er * er + ei * ei);
    if (mag > 1.0) begin
      rel_sum += $sqrt((gr - er) * (gr - er) + (gi - ei) * (gi - ei)) / mag;
      rel_cnt++;
    end
  endfunction
  int     xr [2][MM], xi [2][MM];   // two frames in flight at most
  int     t_in [2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fft_pipeline #(.K(TK)) dut (.clk, .rst, .cfg, .din, .valid_in, .first_in,
    .dout, .valid_out, .first_out);

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int brev(input int v, input int nb);
    int r = 0;
    for (int i = 0; i < nb; i++) if (v[i]) r |= 1 << (nb - 1 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (!rst && first_in) t_in[nfi % 2] = cyc;
    if (!rst && valid_out) begin
      int ln, s, n, f;
      ln = cfg.log2n; s = 1 << cfg.log2s; n = 1 << ln;
      if (first_out) begin
        orow = 0;
        checks++;
        if (cyc - t_in[nfo % 2] != 2*ln + s*n/4 - s) begin
          failures++;
          $display("latency %0d expected %0d", cyc - t_in[nfo % 2], 2*ln + s*n/4 - s);
        end
      end
      f = nfo % 2;
      for (int l = 0; l < 4; l++) begin
        int idx, k, st;
        real sr, si, ang, er, ei;
        idx = ((l >> 1) << (ln - 1)) + ((orow >> cfg.log2s) << 1) + (l & 1);
        k   = brev(idx, ln);
        st  = orow % s;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < n; i++) begin
          ang = 2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
          if (cfg.inverse) ang = -ang;
          sr += real'(xr[f][i*s+st]) * $cos(ang) + real'(xi[f][i*s+st]) * $sin(ang);
          si += real'(xi[f][i*s+st]) * $cos(ang) - real'(xr[f][i*s+st]) * $sin(ang);
        end
        er = sr / real'(n); ei = si / real'(n);
        checks++;
        rel_acc(real'(dout[l].re), real'(dout[l].im), er, ei);
        if (rabs(real'(dout[l].re) - er) > tol_for(ln) || rabs(real'(dout[l].im) - ei) > tol_for(ln)) begin
          failures++;
          if (failures < 20)
            $display("n=%0d S=%0d t=%0d lane %0d (k=%0d s=%0d): got (%0d,%0d) expected (%f,%f)",
                     n, s, orow, l, k, st, dout[l].re, dout[l].im, er, ei);
        end
      end
      orow++;
      if (orow == s*n/4) nfo++;
    end
  end

  task automatic run(input int ln, input int ls, input bit inv);
    int n, s;
    cfg.log2n = 5'(ln); cfg.log2s = 2'(ls); cfg.inverse = inv; cfg.natural = 1'b1;
    n = 1 << ln; s = 1 << ls;
    @(negedge clk);
    repeat (2) begin
      int f;
      f = nfi % 2;
      for (int q = 0; q < s*n; q++) begin
        xr[f][q] = int'($urandom) >>> (33 - DW);
        xi[f][q] = int'($urandom) >>> (33 - DW);
      end
      for (int t = 0; t < s*n/4; t++) begin
        int i, st, nn[4];
        i = t / s; st = t % s;
        nn[0] = i; nn[1] = i + n/2; nn[2] = i + n/4; nn[3] = i + 3*n/4;
        for (int l = 0; l < 4; l++) begin
          din[l].re <= DW'(xr[f][nn[l]*s + st]);
          din[l].im <= DW'(xi[f][nn[l]*s + st]);
        end
        valid_in <= 1'b1;
        first_in <= (t == 0);
        @(negedge clk);
      end
      nfi++;
    end
    valid_in <= 1'b0;
    first_in <= 1'b0;
    repeat (s*n/4 + 2*ln + 4) @(negedge clk);
  endtask

  initial begin
    din = '0;
    cfg = '0;
    cfg.log2n = 5'd6;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(6, 0, 1'b0);
    run(4, 0, 1'b1);
    run(5, 1, 1'b0);
    run(4, 2, 1'b1);
    run(6, 0, 1'b1);
    checks++;
    if (nfo != nfi) begin
      failures++;
      $display("%0d frames out, %0d in", nfo, nfi);
    end
    checks++;
    if (rel_cnt == 0 || rel_sum / real'(rel_cnt) >= 1.0e-5) begin
      failures++;
      $display("average relative error too large");
    end
    $display("average relative error %e over %0d outputs", rel_sum / real'(rel_cnt > 0 ? rel_cnt : 1), rel_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
