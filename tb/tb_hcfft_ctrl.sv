// Self-checking test of hcfft_ctrl (K = 6, GAP = 8). Checks, clock by clock:
// first only on the first accepted clock of a frame; in_ready high for the
// whole frame of S*N/4 clocks and low for exactly GAP clocks afterwards
// (gap_stall); a configuration change waits, with cfg_stall, until the
// frames in flight have been reported out (out_last) and is applied then;
// requests beyond the supported sizes are clamped (log2n >= 4, S*N <= 2**K).
module tb_hcfft_ctrl;
  import hcfft_pkg::*;

  localparam int TK  = 6;
  localparam int GAP = 8;

  logic clk = 1'b0, rst = 1'b1;
  cfg_t cfg_req, cfg_act;
  logic in_valid = 1'b0, in_ready, accept, first, out_last = 1'b0, gap_stall, cfg_stall;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  hcfft_ctrl #(.K(TK), .GAP(GAP)) dut (
    .clk, .rst, .cfg_req, .in_valid, .in_ready, .accept, .first, .out_last,
    .cfg_act, .gap_stall, .cfg_stall);

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // send one frame of `beats` clocks and check the framing and the gap
  task automatic frame(input int beats);
    in_valid = 1'b1;
    for (int b = 0; b < beats; b++) begin
      #1;
      expect_bit(in_ready, 1'b1, "in_ready in frame");
      expect_bit(first, b == 0, "first");
      expect_bit(accept, 1'b1, "accept");
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int g = 0; g < GAP; g++) begin
      #1;
      expect_bit(in_ready, 1'b0, "in_ready in gap");
      expect_bit(gap_stall, 1'b1, "gap_stall");
      @(negedge clk);
    end
    #1;
    expect_bit(gap_stall, 1'b0, "gap over");
  endtask

  function automatic cfg_t mk(input int ln, input int ls);
    cfg_t c;
    c.log2n = 5'(ln); c.log2s = 2'(ls); c.inverse = 1'b0; c.natural = 1'b1;
    return c;
  endfunction

  initial begin
    cfg_req = mk(4, 0);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    expect_bit(in_ready, 1'b1, "ready after reset");
    frame(4);                  // 16 points: 4 clocks
    frame(4);
    // change the configuration while two frames are in flight
    cfg_req = mk(5, 1);        // 32 points x 2 streams: 16 clocks
    @(negedge clk);
    #1;
    expect_bit(in_ready, 1'b0, "ready while draining");
    expect_bit(cfg_stall, 1'b1, "cfg_stall");
    repeat (5) @(negedge clk);
    out_last = 1'b1; @(negedge clk); out_last = 1'b0;   // first frame leaves
    repeat (3) @(negedge clk);
    #1;
    expect_bit(in_ready, 1'b0, "still one frame in flight");
    checks++;
    if (cfg_act.log2n != 5'd4) begin failures++; $display("configuration applied too early"); end
    out_last = 1'b1; @(negedge clk); out_last = 1'b0;   // second frame leaves
    @(negedge clk);
    #1;
    expect_bit(in_ready, 1'b1, "ready after drain");
    checks++;
    if (cfg_act.log2n != 5'd5 || cfg_act.log2s != 2'd1) begin failures++; $display("configuration not applied"); end
    @(negedge clk);
    frame(16);
    // clamping: 64 points x 4 streams does not fit K = 6 -> 16 points
    out_last = 1'b1; @(negedge clk); out_last = 1'b0;
    cfg_req = mk(6, 2);
    repeat (3) @(negedge clk);
    checks++;
    if (cfg_act.log2n != 5'd4 || cfg_act.log2s != 2'd2) begin
      failures++; $display("clamp: got n=%0d s=%0d", cfg_act.log2n, cfg_act.log2s);
    end
    frame(16);
    out_last = 1'b1; @(negedge clk); out_last = 1'b0;
    cfg_req = mk(2, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (cfg_act.log2n != 5'd4) begin failures++; $display("clamp low: got n=%0d", cfg_act.log2n); end
    frame(4);
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
