// Run-time configurable 4-parallel FFT (top level).
//
// Four complex samples enter and four leave every clock. Run-time options:
//   cfg.log2n   size N = 2**log2n, 16 .. 2**K points (K = 16: 64K)
//   cfg.log2s   S = 1, 2 or 4 streams interleaved sample by sample,
//               S*N <= 2**K
//   cfg.inverse forward (X[k]/N) or inverse DFT
//   cfg.natural natural or bit-reversed output order
// Data path: hcfft_ctrl (handshake, framing, reconfiguration) ->
// input_rearrange (natural order -> first-stage order) -> fft_pipeline
// (K radix-2 MDC stages with shuffles and size bypass) -> output_reorder
// (eight RAM blocks).
// Input: in_data[q mod 4] holds sample q of the frame at clock q/4, where
// q = S*n + stream. Output: out_data[r mod 4] holds output r at clock r/4 of
// the output frame, with r = S*k + stream (natural) or
// r = S*bitrev(k) + stream (bit-reversed); out_first / out_last mark the
// frame's first and last clock.
// Timing: latency from the first input clock to the first output clock is
// 3*M/4 - S + 2*log2n + 2 clocks, M = S*N (49185 clocks for a 64K-point
// transform); a frame is M/4 clocks followed by GAP idle clocks.
module hcfft_top
  import hcfft_pkg::*;
#(
  parameter int K   = 16,
  parameter int GAP = 64
) (
  input  logic   clk,
  input  logic   rst,
  input  cfg_t   cfg,
  input  logic   in_valid,
  output logic   in_ready,
  input  lanes_t in_data,
  output logic   out_valid,
  output logic   out_first,
  output logic   out_last,
  output lanes_t out_data,
  output cfg_t   cfg_active,
  output logic   gap_stall,
  output logic   cfg_stall
);

  logic   accept, first;
  lanes_t ir_d, fp_d;
  logic   ir_v, ir_f, fp_v, fp_f;

  hcfft_ctrl #(.K(K), .GAP(GAP)) u_ctrl (
    .clk, .rst, .cfg_req(cfg), .in_valid, .in_ready, .accept, .first,
    .out_last, .cfg_act(cfg_active), .gap_stall, .cfg_stall);

  input_rearrange #(.K(K)) u_in (
    .clk, .rst, .cfg(cfg_active), .din(in_data), .valid_in(accept), .first_in(first),
    .dout(ir_d), .valid_out(ir_v), .first_out(ir_f));

  fft_pipeline #(.K(K)) u_fft (
    .clk, .rst, .cfg(cfg_active), .din(ir_d), .valid_in(ir_v), .first_in(ir_f),
    .dout(fp_d), .valid_out(fp_v), .first_out(fp_f));

  output_reorder #(.K(K)) u_out (
    .clk, .rst, .cfg(cfg_active), .din(fp_d), .valid_in(fp_v), .first_in(fp_f),
    .dout(out_data), .valid_out(out_valid), .first_out(out_first), .last_out(out_last));

endmodule
