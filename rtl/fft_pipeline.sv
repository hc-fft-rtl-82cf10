// The K stages of the variable-size, multistream MDC FFT (K = 16: up to 64K
// points) with the shuffle blocks between them and the bypass multiplexers.
//
// Input order (from input_rearrange): lane 0 carries x[t], lane 1 x[t+N/2],
// lane 2 x[t+N/4], lane 3 x[t+3N/4] of each stream, streams interleaved
// clock by clock. For size N = 2**n only stage 1 and the last n-1 stages
// (K+2-n .. K) are used:
//   stage 1 -> swap lanes 1,2 -> stage K+2-n     (the multiplexer in front of
//                                                 stage K+2-n picks stage 1)
//   stage k-1 -> two shuffles of length S*2**(K-k) -> stage k   (k > K+2-n)
// The shuffle length depends only on k and the stream count S, so one buffer
// of run-time length sits between each pair of stages. Its depth is the
// largest length any legal configuration (S*N <= 2**K) asks for there:
// min(2**(K-3), 2**(K+2-k)).
// Bypassed stages get no valid flags, so no stale frame is left in them when
// the size grows.
// Output: stage K's lanes. A sample at stage-K clock t (of its frame), lane
// {l1,l0}, is FFT bin bitrev_n(idx) of stream t mod S, where
//   idx = l1*2**(n-1) + (t >> log2s)*2 + l0.
// Timing: 2 clocks per used stage plus the shuffle lengths
// (S*(N/4-1) clocks in total for the shuffles).
module fft_pipeline
  import hcfft_pkg::*;
#(
  parameter int K = 16
) (
  input  logic   clk,
  input  logic   rst,
  input  cfg_t   cfg,
  input  lanes_t din,
  input  logic   valid_in,
  input  logic   first_in,
  output lanes_t dout,
  output logic   valid_out,
  output logic   first_out
);

  lanes_t st_in  [1:K];
  lanes_t st_out [1:K];
  logic   v_in   [1:K];
  logic   v_out  [1:K];
  logic   f_in   [1:K];
  logic   f_out  [1:K];

  // stage index that follows stage 1 for the configured size
  logic [5:0] second;
  assign second = 6'(K + 2) - 6'(cfg.log2n);

  assign st_in[1] = din;
  assign v_in[1]  = valid_in;
  assign f_in[1]  = first_in;

  for (genvar k = 1; k <= K; k++) begin : g_stage
    fft_stage #(.K(K), .STAGE(k)) u_stage (
      .clk, .rst, .cfg,
      .din(st_in[k]), .valid_in(v_in[k]), .first_in(f_in[k]),
      .dout(st_out[k]), .valid_out(v_out[k]), .first_out(f_out[k]));
  end

  if (K >= 2) begin : g_s2
    assign st_in[2] = swap12(st_out[1]);
    assign v_in[2]  = v_out[1] && (second == 6'd2);
    assign f_in[2]  = f_out[1] && (second == 6'd2);
  end

  for (genvar k = 3; k <= K; k++) begin : g_link
    localparam int DEPTH = (K + 2 - k < K - 3) ? 2**(K + 2 - k) : 2**(K - 3);
    localparam int LW    = $clog2(DEPTH + 1);
    logic [LW-1:0] len;
    lanes_t        sh;
    logic          sv0, sf0, sv1, sf1;
    logic [5:0]    len_log2;

    always_comb begin
      len_log2 = 6'(K - k) + 6'(cfg.log2s);
      if (len_log2 > 6'($clog2(DEPTH))) len = LW'(DEPTH);
      else                              len = LW'(1) << len_log2;
    end

    shuffle #(.DEPTH(DEPTH), .LW(LW)) u_sh0 (
      .clk, .rst, .len,
      .up_in(st_out[k-1][0]), .lo_in(st_out[k-1][1]),
      .valid_in(v_out[k-1]), .first_in(f_out[k-1]),
      .up_out(sh[0]), .lo_out(sh[1]), .valid_out(sv0), .first_out(sf0));
    shuffle #(.DEPTH(DEPTH), .LW(LW)) u_sh1 (
      .clk, .rst, .len,
      .up_in(st_out[k-1][2]), .lo_in(st_out[k-1][3]),
      .valid_in(v_out[k-1]), .first_in(f_out[k-1]),
      .up_out(sh[2]), .lo_out(sh[3]), .valid_out(sv1), .first_out(sf1));

    // bypass multiplexer: the second stage of the configured size takes
    // stage 1's output, every later stage its shuffled predecessor
    always_comb begin
      if (second == 6'(k)) begin
        st_in[k] = swap12(st_out[1]);
        v_in[k]  = v_out[1];
        f_in[k]  = f_out[1];
      end else begin
        // stages in front of the second stage are bypassed: keep them empty
        st_in[k] = sh;
        v_in[k]  = sv0 && (6'(k) > second);
        f_in[k]  = sf0 && (6'(k) > second);
      end
    end
  end

  assign dout      = st_out[K];
  assign valid_out = v_out[K];
  assign first_out = f_out[K];

endmodule
