// Self-checking test of the shuffle block (DEPTH = 8) at run-time lengths
// L = 1, 2, 4 and 8. Frames of 4L clocks are sent with random gaps between
// them (none, shorter than L, longer). For every output clock the expected
// words are looked up in the recorded input: with p the frame position of the
// input L clocks earlier and w = p mod 2L, the upper output is A (upper
// input, w < L) or C (lower input), the lower output is B or D. valid and
// first must come out exactly L clocks after they went in, and no false
// valid may appear when the length changes.
module tb_shuffle;
  import hcfft_pkg::*;

  localparam int DEPTH = 8;
  localparam int LW    = 4;
  localparam int NC    = 4000;

  logic          clk = 1'b0, rst = 1'b1;
  logic [LW-1:0] len;
  cplx_t         up_in, lo_in, up_out, lo_out;
  logic          valid_in, first_in, valid_out, first_out;

  int checks = 0, failures = 0;
  int cyc = 0;
  int uh [NC], lh [NC], pos [NC], fst [NC];
  bit vh [NC], fh [NC];

  always #5 clk = ~clk;

  shuffle #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .len, .up_in, .lo_in, .valid_in, .first_in,
    .up_out, .lo_out, .valid_out, .first_out);

  // record inputs and check outputs at every rising edge
  int cur_pos = 0, cur_start = 0;
  always @(posedge clk) begin
    if (!rst) begin
      int L;
      L = int'(len);
      uh[cyc] = int'(up_in.re); lh[cyc] = int'(lo_in.re);
      vh[cyc] = valid_in; fh[cyc] = first_in;
      if (first_in) begin cur_pos = 0; cur_start = cyc; end
      pos[cyc] = cur_pos; fst[cyc] = cur_start;
      cur_pos++;
      if (cyc >= L + 2) begin
        int c0, p, w, base, s, eu, el;
        c0 = cyc - L;
        checks++;
        if (valid_out != vh[c0] || first_out != fh[c0]) begin
          failures++;
          $display("cycle %0d L=%0d: valid/first %0d%0d expected %0d%0d", cyc, L, valid_out, first_out, vh[c0], fh[c0]);
        end
        if (vh[c0]) begin
          p = pos[c0]; s = fst[c0]; w = p % (2*L); base = p - w;
          eu = (w < L) ? uh[s + base + w] : lh[s + base + w - L];
          el = (w < L) ? uh[s + base + L + w] : lh[s + base + w];
          checks += 2;
          if (int'(up_out.re) != eu || int'(lo_out.re) != el) begin
            failures++;
            $display("cycle %0d L=%0d p=%0d: got %0d/%0d expected %0d/%0d", cyc, L, p, up_out.re, lo_out.re, eu, el);
          end
        end
      end
      cyc++;
    end
  end

  task automatic frames(input int L, input int nf);
    len <= LW'(L);
    @(negedge clk);       // a new length must be set before the frame arrives
    for (int f = 0; f < nf; f++) begin
      int gap;
      for (int i = 0; i < 4*L; i++) begin
        valid_in <= 1'b1;
        first_in <= (i == 0);
        up_in.re <= DW'($urandom_range(30000));
        lo_in.re <= DW'($urandom_range(30000));
        @(negedge clk);
      end
      valid_in <= 1'b0;
      first_in <= 1'b0;
      gap = (f % 3 == 0) ? 0 : (f % 3 == 1) ? (L > 1 ? L / 2 : 0) : 3 * L + 1;
      repeat (gap) begin
        up_in.re <= DW'($urandom_range(30000));
        lo_in.re <= DW'($urandom_range(30000));
        @(negedge clk);
      end
    end
    // drain before the length changes
    valid_in <= 1'b0;
    repeat (2*DEPTH + 2) @(negedge clk);
  endtask

  initial begin
    up_in = '0; lo_in = '0; valid_in = 1'b0; first_in = 1'b0; len = LW'(1);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    frames(1, 6);
    frames(2, 6);
    frames(4, 6);
    frames(8, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NC - 10) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
