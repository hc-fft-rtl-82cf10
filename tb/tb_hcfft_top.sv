// End-to-end test of the configurable FFT at a reduced maximum size
// (K = 8: up to 256 points) so every configuration class is covered quickly.
//
// Random complex frames are pushed through a sequence of configurations:
// every legal size (16 to 256 points, S*N <= 256) with 1, 2 and 4
// streams, forward and inverse, natural and bit-reversed order,
// back-to-back frames with the same configuration and switches that force a
// pipeline drain. Every output word is compared with a direct DFT computed
// here in floating point (forward: X[k]/N, inverse: (1/N) * sum x[n] W^-nk),
// tolerance 4 LSB per part plus twiddle quantisation, and the average
// relative error must stay below 1e-5. The latency of every frame
// (3*M/4 - S + 2*log2n + 2 clocks, M = S*N) and the
// spacing of back-to-back frames (M/4 + GAP clocks) are checked too.
// Mechanism counters (gap stall, drain for reconfiguration, stage bypass,
// 2 and 4 streams, inverse, bit-reversed output) must all be non-zero.
module tb_hcfft_top;
  import hcfft_pkg::*;

  localparam int TK   = 8;
  localparam int GAP  = 64;
  localparam int MAXM = 2**TK;
  localparam int MAXF = 64;

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

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  cfg_t   cfg;
  logic   in_valid = 1'b0, in_ready;
  lanes_t in_data;
  logic   out_valid, out_first, out_last;
  lanes_t out_data;
  cfg_t   cfg_active;
  logic   gap_stall, cfg_stall;

  always #5 clk = ~clk;

  hcfft_top #(.K(TK), .GAP(GAP)) dut (
    .clk, .rst, .cfg, .in_valid, .in_ready, .in_data,
    .out_valid, .out_first, .out_last, .out_data, .cfg_active, .gap_stall, .cfg_stall);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // frame records
  int   xr [MAXF][MAXM];
  int   xi [MAXF][MAXM];
  cfg_t fcfg [MAXF];
  longint t_in [MAXF];
  int   nfr_in = 0, nfr_out = 0;

  // mechanism counters
  int n_gap = 0, n_drain = 0, n_bypass = 0, n_s2 = 0, n_s4 = 0, n_inv = 0, n_brev = 0;
  int n_nat = 0, n_b2b = 0, n_full = 0;

  always @(posedge clk) begin
    if (!rst && gap_stall) n_gap++;
    if (!rst && cfg_stall) n_drain++;
  end

  function automatic void expect_bin(input int f, input int k, input int st,
                                     output real er, output real ei);
    int n, s;
    real ang, sr, si;
    n = 1 << fcfg[f].log2n;
    s = 1 << fcfg[f].log2s;
    sr = 0.0; si = 0.0;
    for (int i = 0; i < n; i++) begin
      ang = 2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
      if (fcfg[f].inverse) ang = -ang;
      // x * (cos - j sin)
      sr += real'(xr[f][i*s+st]) * $cos(ang) + real'(xi[f][i*s+st]) * $sin(ang);
      si += real'(xi[f][i*s+st]) * $cos(ang) - real'(xr[f][i*s+st]) * $sin(ang);
    end
    er = sr / real'(n);
    ei = si / real'(n);
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int brev(input int v, input int nb);
    int r = 0;
    for (int i = 0; i < nb; i++) if (v[i]) r |= 1 << (nb - 1 - i);
    return r;
  endfunction

  // output monitor
  int orow = 0;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int f, s, m, ln;
      f  = nfr_out;
      s  = 1 << fcfg[f].log2s;
      ln = fcfg[f].log2n;
      m  = s << ln;
      if (out_first) begin
        int exp_lat;
        orow = 0;
        exp_lat = 3*m/4 - s + 2*ln + 2;
        checks++;
        if (cyc - t_in[f] != longint'(exp_lat)) begin
          failures++;
          $display("latency frame %0d: %0d expected %0d", f, cyc - t_in[f], exp_lat);
        end
      end
      for (int j = 0; j < 4; j++) begin
        int r, k, st;
        real er, ei;
        r  = orow*4 + j;
        st = r % s;
        k  = fcfg[f].natural ? r / s : brev(r / s, ln);
        expect_bin(f, k, st, er, ei);
        checks++;
        rel_acc(real'(out_data[j].re), real'(out_data[j].im), er, ei);
        if (rabs(real'(out_data[j].re) - er) > tol_for(ln) ||
            rabs(real'(out_data[j].im) - ei) > tol_for(ln)) begin
          failures++;
          if (failures < 20)
            $display("frame %0d cfg n=%0d s=%0d inv=%0d nat=%0d r=%0d: got (%0d,%0d) exp (%f,%f)",
                     f, ln, s, fcfg[f].inverse, fcfg[f].natural, r,
                     out_data[j].re, out_data[j].im, er, ei);
        end
      end
      orow++;
      if (out_last) begin
        checks++;
        if (orow != m/4) begin
          failures++;
          $display("frame %0d: %0d output clocks, expected %0d", f, orow, m/4);
        end
        nfr_out++;
      end
    end
  end

  // drive one frame with configuration c; waits for in_ready
  task automatic send_frame(input cfg_t c);
    int f, m;
    f = nfr_in;
    fcfg[f] = c;
    m = (1 << c.log2s) << c.log2n;
    for (int q = 0; q < m; q++) begin
      xr[f][q] = int'($urandom) >>> (33 - DW);
      xi[f][q] = int'($urandom) >>> (33 - DW);
    end
    cfg <= c;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    t_in[f] = cyc;
    nfr_in++;
    if (c.log2n < TK) n_bypass++;
    if (c.log2n == TK) n_full++;
    if (c.log2s == 1) n_s2++;
    if (c.log2s == 2) n_s4++;
    if (c.inverse) n_inv++;
    if (!c.natural) n_brev++; else n_nat++;
    for (int b = 0; b < m/4; b++) begin
      in_valid <= 1'b1;
      for (int j = 0; j < 4; j++) begin
        in_data[j].re <= DW'(xr[f][4*b+j]);
        in_data[j].im <= DW'(xi[f][4*b+j]);
      end
      @(negedge clk);
      if (b < m/4 - 1 && !in_ready) begin
        failures++;
        $display("in_ready dropped inside a frame");
      end
    end
    in_valid <= 1'b0;
  endtask

  function automatic cfg_t mk(input int ln, input int ls, input bit inv, input bit nat);
    cfg_t c;
    c.log2n = 5'(ln); c.log2s = 2'(ls); c.inverse = inv; c.natural = nat;
    return c;
  endfunction

  initial begin
    longint t0;
    in_data = '0;
    cfg = mk(TK, 0, 0, 1);
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // back-to-back frames at full size, with throughput check
    send_frame(mk(TK, 0, 0, 1));
    t0 = t_in[0];
    send_frame(mk(TK, 0, 0, 1));
    checks++;
    if (t_in[1] - t0 != longint'((1 << TK)/4 + GAP)) begin
      failures++;
      $display("frame spacing %0d expected %0d", t_in[1] - t0, (1 << TK)/4 + GAP);
    end else n_b2b++;
    // every size, forward/inverse, both orders, 1 stream
    for (int ln = 4; ln <= TK; ln++) begin
      send_frame(mk(ln, 0, ln % 2, 1));
      send_frame(mk(ln, 0, ln % 2, 0));
    end
    // 2 and 4 streams
    for (int ls = 1; ls <= 2; ls++)
      for (int ln = 4; ln <= TK - ls; ln++) begin
        send_frame(mk(ln, ls, 0, 1));
        send_frame(mk(ln, ls, 0, 1));
        send_frame(mk(ln, ls, 1, 0));
      end
    send_frame(mk(TK - 2, 2, 1, 1));
    // wait for everything to come out
    repeat (4 * MAXM + 500) @(negedge clk);
    checks++;
    if (nfr_out != nfr_in) begin
      failures++;
      $display("frames out %0d, in %0d", nfr_out, nfr_in);
    end
    $display("mechanisms: gap=%0d drain=%0d bypass=%0d full=%0d s2=%0d s4=%0d inv=%0d brev=%0d nat=%0d b2b=%0d",
             n_gap, n_drain, n_bypass, n_full, n_s2, n_s4, n_inv, n_brev, n_nat, n_b2b);
    if (n_gap == 0 || n_drain == 0 || n_bypass == 0 || n_full == 0 || n_s2 == 0 || n_s4 == 0 ||
        n_inv == 0 || n_brev == 0 || n_nat == 0 || n_b2b == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
