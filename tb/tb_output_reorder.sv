// Self-checking test of output_reorder at K = 6 (frames up to 64 samples).
// The input is labelled the way the last FFT stage delivers it: at clock t
// of a frame, lane {l1,l0} carries bin k = bitrev_n(l1*2**(n-1) +
// (t >> log2s)*2 + l0) of stream t mod S (re = k, im = stream). Output r of
// a frame must be bin r/S (natural) or bitrev_n(r/S) (bit-reversed) of
// stream r mod S. Two back-to-back frames per configuration exercise both
// halves of the buffer; first/last and the latency (first output M/4 + 3
// clocks after the first input) are checked.
module tb_output_reorder;
  import hcfft_pkg::*;

  localparam int TK = 6;

  logic   clk = 1'b0, rst = 1'b1;
  cfg_t   cfg;
  lanes_t din, dout;
  logic   valid_in = 1'b0, first_in = 1'b0, valid_out, first_out, last_out;
  int     checks = 0, failures = 0;
  int     cyc = 0, t_in_q[$], orow = 0, nout = 0, nin = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  output_reorder #(.K(TK)) dut (
    .clk, .rst, .cfg, .din, .valid_in, .first_in, .dout, .valid_out, .first_out, .last_out);

  function automatic int brev(input int v, input int nb);
    int r = 0;
    for (int i = 0; i < nb; i++) if (v[i]) r |= 1 << (nb - 1 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (!rst && first_in) t_in_q.push_back(cyc);
    if (!rst && valid_out) begin
      int s, n, m, ln;
      ln = cfg.log2n; s = 1 << cfg.log2s; n = 1 << ln; m = s * n;
      if (first_out) begin
        int t0;
        orow = 0;
        t0 = t_in_q.pop_front();
        checks++;
        if (cyc - t0 != m/4 + 3) begin
          failures++;
          $display("latency %0d expected %0d at %0d (t0 %0d)", cyc - t0, m/4 + 3, cyc, t0);
        end
      end
      for (int j = 0; j < 4; j++) begin
        int r, ek, es;
        r = 4*orow + j;
        es = r % s;
        ek = cfg.natural ? r / s : brev(r / s, ln);
        checks++;
        if (int'(dout[j].re) != ek || int'(dout[j].im) != es) begin
          failures++;
          if (failures < 20)
            $display("n=%0d S=%0d nat=%0d r=%0d: got k=%0d s=%0d expected k=%0d s=%0d",
                     n, s, cfg.natural, r, dout[j].re, dout[j].im, ek, es);
        end
      end
      checks++;
      if (last_out != (orow == m/4 - 1)) begin
        failures++;
        $display("last_out wrong at row %0d", orow);
      end
      if (last_out) nout++;
      orow++;
    end
  end

  task automatic run(input int ln, input int ls, input bit nat);
    int m, s;
    cfg.log2n = 5'(ln); cfg.log2s = 2'(ls); cfg.inverse = 1'b0; cfg.natural = nat;
    s = 1 << ls;
    m = s << ln;
    @(negedge clk);
    repeat (2) begin
      for (int t = 0; t < m/4; t++) begin
        valid_in <= 1'b1;
        first_in <= (t == 0);
        for (int l = 0; l < 4; l++) begin
          int idx;
          idx = ((l >> 1) << (ln - 1)) + ((t >> ls) << 1) + (l & 1);
          din[l] <= '{re: DW'(brev(idx, ln)), im: DW'(t % s)};
        end
        @(negedge clk);
        nin += (t == 0);
      end
    end
    valid_in <= 1'b0;
    first_in <= 1'b0;
    repeat (m/2 + 8) @(negedge clk);
  endtask

  initial begin
    din = '0;
    cfg = '0;
    cfg.log2n = 5'd4;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int nat = 0; nat < 2; nat++) begin
      run(4, 0, nat[0]);
      run(6, 0, nat[0]);
      run(5, 1, nat[0]);
      run(4, 1, nat[0]);
      run(4, 2, nat[0]);
    end
    checks++;
    if (nout != nin) begin
      failures++;
      $display("%0d frames out, %0d in", nout, nin);
    end
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
