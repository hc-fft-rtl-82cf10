// Self-checking test of input_rearrange at K = 7 (shuffle chain 1..16).
// For several sizes and stream counts, two back-to-back frames of samples
// labelled with their natural input index q are sent. At output clock t of a
// frame (stream s = t mod S, i = t / S) lanes 0..3 must carry the samples of
// stream s with indices i, i+N/2, i+N/4, i+3N/4 (q = index*S + s), and the
// first output clock must come S*N/4 - 1 clocks after the first input clock.
module tb_input_rearrange;
  import hcfft_pkg::*;

  localparam int TK = 7;

  logic   clk = 1'b0, rst = 1'b1;
  cfg_t   cfg;
  lanes_t din, dout;
  logic   valid_in = 1'b0, first_in = 1'b0, valid_out, first_out;
  int     checks = 0, failures = 0;
  int     cyc = 0, t_first_in = 0, t_out = 0, n_frames_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  input_rearrange #(.K(TK)) dut (
    .clk, .rst, .cfg, .din, .valid_in, .first_in, .dout, .valid_out, .first_out);

  always @(posedge clk) begin
    if (!rst && first_in) t_first_in = cyc;
    if (!rst && valid_out) begin
      int s, n, m, st, i, nn[4];
      s = 1 << cfg.log2s; n = 1 << cfg.log2n; m = s * n;
      if (first_out) begin
        t_out = 0;
        n_frames_out++;
        checks++;
        if (cyc - t_first_in != m/4 - 1) begin
          failures++;
          $display("latency %0d expected %0d", cyc - t_first_in, m/4 - 1);
        end
      end
      st = t_out % s; i = t_out / s;
      nn[0] = i; nn[1] = i + n/2; nn[2] = i + n/4; nn[3] = i + 3*n/4;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(dout[l].re) != nn[l]*s + st) begin
          failures++;
          if (failures < 20)
            $display("n=%0d S=%0d t=%0d lane %0d: got %0d expected %0d", n, s, t_out, l, dout[l].re, nn[l]*s + st);
        end
      end
      t_out++;
    end
  end

  task automatic run(input int ln, input int ls);
    int m;
    cfg.log2n = 5'(ln); cfg.log2s = 2'(ls); cfg.inverse = 1'b0; cfg.natural = 1'b1;
    m = (1 << ls) << ln;
    @(negedge clk);
    repeat (2) begin
      for (int b = 0; b < m/4; b++) begin
        valid_in <= 1'b1;
        first_in <= (b == 0);
        for (int l = 0; l < 4; l++) din[l] <= '{re: DW'(4*b + l), im: '0};
        @(negedge clk);
      end
    end
    valid_in <= 1'b0;
    first_in <= 1'b0;
    repeat (m/4 + 4) @(negedge clk);
  endtask

  initial begin
    din = '0;
    cfg = '0;
    cfg.log2n = 5'd4;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(4, 0);
    run(5, 0);
    run(7, 0);
    run(4, 1);
    run(6, 1);
    run(4, 2);
    run(5, 2);
    checks++;
    if (n_frames_out != 14) begin
      failures++;
      $display("%0d frames came out, expected 14", n_frames_out);
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
