// Self-checking test of twiddle_rom with two small tables of a 64-point
// circle (K = 6): the first-stage table W_64^0..W_64^31 and the table of a
// later stage (STEP_LOG2 = 2: W_64^0, W_64^4, ...). Every entry is read on
// both ports (data one clock after the address) and compared with
// cos/sin computed here, within 1 LSB.
module tb_twiddle_rom;
  import hcfft_pkg::*;

  logic       clk = 1'b0;
  logic [4:0] a1a, a1b;
  logic [2:0] a2a, a2b;
  twid_t      q1a, q1b, q2a, q2b;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  twiddle_rom #(.K(6), .ABITS(5), .STEP_LOG2(0)) dut1 (
    .clk, .addr_a(a1a), .addr_b(a1b), .q_a(q1a), .q_b(q1b));
  twiddle_rom #(.K(6), .ABITS(3), .STEP_LOG2(2)) dut2 (
    .clk, .addr_a(a2a), .addr_b(a2b), .q_a(q2a), .q_b(q2b));

  task automatic cmp(input twid_t q, input int e, input string what);
    real ang;
    int  er, ei;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / 64.0;
    er = int'($floor($cos(ang) * real'(2**TFRAC) + 0.5));
    ei = int'($floor(-$sin(ang) * real'(2**TFRAC) + 0.5));
    checks += 2;
    if (int'(q.re) > er + 1 || int'(q.re) < er - 1 || int'(q.im) > ei + 1 || int'(q.im) < ei - 1) begin
      failures++;
      $display("%s W64^%0d: got (%0d,%0d) exp (%0d,%0d)", what, e, q.re, q.im, er, ei);
    end
  endtask

  initial begin
    a1a = '0; a1b = '0; a2a = '0; a2b = '0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      a1a = 5'(i); a1b = 5'(31 - i); a2a = 3'(i); a2b = 3'(7 - i);
      @(posedge clk); #1;
      a1a = 5'(i + 7); a2a = 3'(i + 3);   // must not disturb the registered data
      cmp(q1a, i, "port a");
      cmp(q1b, 31 - i, "port b");
      cmp(q2a, (i % 8) * 4, "stage port a");
      cmp(q2b, ((7 - i) % 8 + 8) % 8 * 4, "stage port b");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
