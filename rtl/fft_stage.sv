// One stage of the 4-parallel radix-2 DIF multipath-delay-commutator FFT.
//
// Lanes 0/1 and lanes 2/3 each feed an R2 butterfly; the pair differs in the
// index bit this stage butterflies on. The upper butterfly output goes
// straight on, the lower one is rotated by the stage's twiddle. A frame
// counter t restarts on first_in and counts clocks; with S = 2**log2s
// interleaved streams the position inside one stream's transform is t >> log2s
// (each twiddle is used S times in a row).
//   STAGE = 1 (always the first stage, serves every size N = 2**log2n):
//     lane 1 uses W_N^i,       i = t >> log2s
//     lane 3 uses W_N^(i+N/4)
//     read from the 2**(K-1)-entry ROM at address i * 2**(K-log2n).
//   2 <= STAGE < K: both lower lanes use W_(2**(K+1-STAGE))^(i mod 2**(K-STAGE)),
//     independent of N (a smaller FFT bypasses the stages in front of it).
//   STAGE = K: no rotation (the twiddle is always 1).
// Timing: latency 2 clocks (butterfly register, rotator register) for data and
// for valid/first. inverse conjugates the twiddles.
module fft_stage
  import hcfft_pkg::*;
#(
  parameter int K     = 16,
  parameter int STAGE = 1
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

  localparam int TB = K - 2;   // frame clock counter width (up to 2**K/4 clocks)

  logic [TB-1:0] t, t_eff, i_pos;
  logic [1:0]    vq, fq;
  cplx_t         s0, d0, s1, d1;
  cplx_t         s0_q, s1_q;

  always_comb begin
    t_eff = first_in ? '0 : t;
    i_pos = t_eff >> cfg.log2s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t  <= '0;
      vq <= '0;
      fq <= '0;
    end else begin
      t  <= t_eff + 1'b1;
      vq <= {vq[0], valid_in};
      fq <= {fq[0], first_in};
    end
  end
  assign valid_out = vq[1];
  assign first_out = fq[1];

  r2_butterfly u_bf0 (.clk, .a(din[0]), .b(din[1]), .s(s0), .d(d0));
  r2_butterfly u_bf1 (.clk, .a(din[2]), .b(din[3]), .s(s1), .d(d1));

  always_ff @(posedge clk) begin
    s0_q <= s0;
    s1_q <= s1;
  end
  assign dout[0] = s0_q;
  assign dout[2] = s1_q;

  if (STAGE == K) begin : g_last
    cplx_t d0_q, d1_q;
    always_ff @(posedge clk) begin
      d0_q <= d0;
      d1_q <= d1;
    end
    assign dout[1] = d0_q;
    assign dout[3] = d1_q;
  end else begin : g_rot
    localparam int AB = (STAGE == 1) ? K - 1 : K - STAGE;
    logic [AB-1:0] addr_a, addr_b;
    twid_t         w_a, w_b;

    if (STAGE == 1) begin : g_first
      logic [K-1:0] i1, i3;
      always_comb begin
        i1 = K'(i_pos);
        i3 = K'(i_pos) + (K'(1) << (cfg.log2n - 5'd2));
        addr_a = AB'(i1 << (5'(K) - cfg.log2n));
        addr_b = AB'(i3 << (5'(K) - cfg.log2n));
      end
    end else begin : g_later
      always_comb begin
        addr_a = AB'(i_pos);
        addr_b = addr_a;
      end
    end

    twiddle_rom #(.K(K), .ABITS(AB), .STEP_LOG2(STAGE - 1)) u_rom (
      .clk, .addr_a, .addr_b, .q_a(w_a), .q_b(w_b));

    rotator u_rot0 (.clk, .inverse(cfg.inverse), .x(d0), .w(w_a), .y(dout[1]));
    rotator u_rot1 (.clk, .inverse(cfg.inverse), .x(d1), .w(w_b), .y(dout[3]));
  end

endmodule
