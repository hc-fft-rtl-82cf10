// Full-size test of the configurable FFT with all parameters at their
// defaults (K = 16: 64K points, 64-clock gap).
//
// Two frames of 65536 random complex samples each:
//   1. one 65536-point forward transform, natural output order;
//   2. four interleaved 16384-point inverse transforms, bit-reversed order
//      (the configuration change makes the controller drain the pipeline).
// A direct DFT of 256 randomly chosen output positions per frame is computed
// here in floating point and compared (tolerance 4 LSB per part plus
// twiddle quantisation, average relative error below 1e-5); the
// number of output clocks per frame (16384) and the latency from the first
// input clock to the first output clock (3*M/4 - S + 2*log2n + 2: 49185
// clocks for frame 1) are checked as well.
module tb_hcfft_full;
  import hcfft_pkg::*;

  localparam int M    = 65536;
  localparam int NCHK = 256;

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

  hcfft_top dut (
    .clk, .rst, .cfg, .in_valid, .in_ready, .in_data,
    .out_valid, .out_first, .out_last, .out_data, .cfg_active, .gap_stall, .cfg_stall);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int     xr [2][M];
  int     xi [2][M];
  cfg_t   fcfg [2];
  longint t_in [2];
  int     nfr_in = 0, nfr_out = 0;
  // positions to check, and what came out there
  int     chk_pos [2][NCHK];
  int     got_re  [2][NCHK];
  int     got_im  [2][NCHK];
  int     orow = 0, n_drain = 0;

  always @(posedge clk) if (!rst && cfg_stall) n_drain++;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int brev(input int v, input int nb);
    int r = 0;
    for (int i = 0; i < nb; i++) if (v[i]) r |= 1 << (nb - 1 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int f, s, ln;
      f  = nfr_out;
      s  = 1 << fcfg[f].log2s;
      ln = fcfg[f].log2n;
      if (out_first) begin
        int exp_lat;
        orow = 0;
        exp_lat = 3*M/4 - s + 2*ln + 2;
        checks++;
        if (cyc - t_in[f] != longint'(exp_lat)) begin
          failures++;
          $display("latency frame %0d: %0d expected %0d", f, cyc - t_in[f], exp_lat);
        end else
          $display("frame %0d latency %0d clocks", f, exp_lat);
      end
      for (int j = 0; j < 4; j++)
        for (int c = 0; c < NCHK; c++)
          if (chk_pos[f][c] == orow*4 + j) begin
            got_re[f][c] = out_data[j].re;
            got_im[f][c] = out_data[j].im;
          end
      orow++;
      if (out_last) begin
        checks++;
        if (orow != M/4) begin
          failures++;
          $display("frame %0d: %0d output clocks", f, orow);
        end
        nfr_out++;
      end
    end
  end

  task automatic send_frame(input cfg_t c);
    int f;
    f = nfr_in;
    fcfg[f] = c;
    for (int q = 0; q < M; q++) begin
      xr[f][q] = int'($urandom) >>> (33 - DW);
      xi[f][q] = int'($urandom) >>> (33 - DW);
    end
    for (int k = 0; k < NCHK; k++) chk_pos[f][k] = (k < 4) ? k : int'($urandom_range(M - 1));
    cfg <= c;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    t_in[f] = cyc;
    nfr_in++;
    for (int b = 0; b < M/4; b++) begin
      in_valid <= 1'b1;
      for (int j = 0; j < 4; j++) begin
        in_data[j].re <= DW'(xr[f][4*b+j]);
        in_data[j].im <= DW'(xi[f][4*b+j]);
      end
      @(negedge clk);
    end
    in_valid <= 1'b0;
  endtask

  task automatic check_frame(input int f);
    int s, ln, n;
    s  = 1 << fcfg[f].log2s;
    ln = fcfg[f].log2n;
    n  = 1 << ln;
    for (int c = 0; c < NCHK; c++) begin
      int r, st, k;
      real sr, si, ang, er, ei;
      r  = chk_pos[f][c];
      st = r % s;
      k  = fcfg[f].natural ? r / s : brev(r / s, ln);
      sr = 0.0; si = 0.0;
      for (int i = 0; i < n; i++) begin
        ang = 2.0 * 3.14159265358979323846 * real'(longint'(i) * longint'(k) % longint'(n)) / real'(n);
        if (fcfg[f].inverse) ang = -ang;
        sr += real'(xr[f][i*s+st]) * $cos(ang) + real'(xi[f][i*s+st]) * $sin(ang);
        si += real'(xi[f][i*s+st]) * $cos(ang) - real'(xr[f][i*s+st]) * $sin(ang);
      end
      er = sr / real'(n);
      ei = si / real'(n);
      checks++;
      rel_acc(real'(got_re[f][c]), real'(got_im[f][c]), er, ei);
      if (rabs(real'(got_re[f][c]) - er) > tol_for(ln) || rabs(real'(got_im[f][c]) - ei) > tol_for(ln)) begin
        failures++;
        if (failures < 20)
          $display("frame %0d r=%0d: got (%0d,%0d) expected (%f,%f)", f, r, got_re[f][c], got_im[f][c], er, ei);
      end
    end
  endtask

  initial begin
    cfg_t c;
    in_data = '0;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < NCHK; k++) begin
        chk_pos[f][k] = -1; got_re[f][k] = 0; got_im[f][k] = 0;
      end
    c.log2n = 5'd16; c.log2s = 2'd0; c.inverse = 1'b0; c.natural = 1'b1;
    cfg = c;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    send_frame(c);
    c.log2n = 5'd14; c.log2s = 2'd2; c.inverse = 1'b1; c.natural = 1'b0;
    send_frame(c);
    while (nfr_out < 2) @(negedge clk);
    check_frame(0);
    check_frame(1);
    checks++;
    if (n_drain == 0) begin
      failures++;
      $display("no drain before the configuration change");
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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
