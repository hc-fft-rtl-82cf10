// Run-time length delay line (one of the L-length buffers of a shuffle block).
//
// q equals d delayed by len clocks, 1 <= len <= DEPTH. For len >= 2 the delay
// is a circular buffer of len-1 words (a RAM in hardware) followed by the
// output register; len = 1 is the output register alone. The buffer shifts
// every clock whether or not the data are valid. Changing len while data are
// in flight corrupts them; the controller only changes it when the pipeline
// is empty. The stored words are not reset; with ZERO_UNTIL_FILLED = 1 the
// output reads 0 until len clocks after reset or after a change of len, so
// that stale words never show up as valid flags.
module delay_line #(
  parameter int W     = 32,
  parameter bit ZERO_UNTIL_FILLED = 1'b0,
  parameter int DEPTH = 8,
  parameter int LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW-1:0] len,
  input  logic [W-1:0]  d,
  output logic [W-1:0]  q
);

  logic [W-1:0] q_raw;

  if (DEPTH == 1) begin : g_reg
    always_ff @(posedge clk) q_raw <= d;
  end else begin : g_ram
    localparam int PW = $clog2(DEPTH);
    logic [W-1:0]  mem [DEPTH-1];
    logic [PW-1:0] ptr;
    logic          short_len;

    assign short_len = (len <= LW'(1));

    always_ff @(posedge clk) begin
      if (rst) ptr <= '0;
      else if (short_len || 32'(ptr) + 2 >= 32'(len)) ptr <= '0;
      else ptr <= ptr + 1'b1;
    end

    always_ff @(posedge clk) begin
      if (short_len) q_raw <= d;
      else begin
        q_raw    <= mem[ptr];
        mem[ptr] <= d;
      end
    end
  end

  if (ZERO_UNTIL_FILLED) begin : g_fill
    logic [LW:0]   fill;
    logic [LW-1:0] len_q;
    logic          filled;
    assign filled = (fill >= (LW+1)'(len)) && (len == len_q);
    always_ff @(posedge clk) begin
      len_q <= len;
      if (rst || len != len_q) fill <= '0;
      else if (!filled)        fill <= fill + 1'b1;
    end
    assign q = filled ? q_raw : '0;
  end else begin : g_nofill
    assign q = q_raw;
  end

endmodule
