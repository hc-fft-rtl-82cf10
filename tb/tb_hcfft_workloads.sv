// Workload test at the default parameters (K = 16, 64-clock gap): the
// transform sizes of the implementation comparison, 1K, 4K and 64K points,
// one stream, forward, natural order.
//   1. a 1024-point frame, then a 4096-point frame (reconfiguration drain);
//   2. two 65536-point frames back to back: their starts must be
//      16384 + 64 clocks apart, i.e. 4*16384/16448 = 3.98 samples per clock
//      (1350 MS/s at 339 MHz).
// 256 output positions per frame are checked against a direct DFT
// (tolerance 4 LSB plus twiddle quantisation, average relative error below
// 1e-5), as are the latency 3*N/4 - 1 + 2*log2n + 2 and the
// frame length.
module tb_hcfft_workloads;
  import hcfft_pkg::*;

  localparam int M    = 65536;
  localparam int NF   = 4;
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

  int     xr [NF][M];
  int     xi [NF][M];
  cfg_t   fcfg [NF];
  longint t_in [NF];
  int     nfr_in = 0, nfr_out = 0;
  // positions to check, and what came out there
  int     chk_pos [NF][NCHK];
  int     got_re  [NF][NCHK];
  int     got_im  [NF][NCHK];
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
      int f, s, ln, mm;
      f  = nfr_out;
      s  = 1 << fcfg[f].log2s;
      ln = fcfg[f].log2n;
      mm = s << ln;
      if (out_first) begin
        int exp_lat;
        orow = 0;
        exp_lat = 3*mm/4 - s + 2*ln + 2;
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
        if (orow != mm/4) begin
          failures++;
          $display("frame %0d: %0d output clocks", f, orow);
        end
        nfr_out++;
      end
    end
  end

  task automatic send_frame(input cfg_t c);
    int f, mm;
    f = nfr_in;
    fcfg[f] = c;
    mm = (1 << c.log2s) << c.log2n;
    for (int q = 0; q < mm; q++) begin
      xr[f][q] = int'($urandom) >>> (33 - DW);
      xi[f][q] = int'($urandom) >>> (33 - DW);
    end
    for (int k = 0; k < NCHK; k++) chk_pos[f][k] = (k < 4) ? k : int'($urandom_range(mm - 1));
    cfg <= c;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    t_in[f] = cyc;
    nfr_in++;
    for (int b = 0; b < mm/4; b++) begin
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
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < NCHK; k++) begin
        chk_pos[f][k] = -1; got_re[f][k] = 0; got_im[f][k] = 0;
      end
    c.log2n = 5'd10; c.log2s = 2'd0; c.inverse = 1'b0; c.natural = 1'b1;
    cfg = c;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    send_frame(c);
    c.log2n = 5'd12;
    send_frame(c);
    c.log2n = 5'd16;
    send_frame(c);
    send_frame(c);
    checks++;
    if (t_in[3] - t_in[2] != longint'(M/4 + 64)) begin
      failures++;
      $display("64K frames %0d clocks apart, expected %0d", t_in[3] - t_in[2], M/4 + 64);
    end else
      $display("64K frames every %0d clocks: %f samples per clock", M/4 + 64, 4.0 * real'(M/4) / real'(M/4 + 64));
    while (nfr_out < NF) @(negedge clk);
    for (int f = 0; f < NF; f++) check_frame(f);
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
