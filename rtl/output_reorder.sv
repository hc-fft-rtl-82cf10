// Output reorder buffer: eight RAM blocks and their addressing unit.
//
// The DIF pipeline delivers each frame in bit-reversed order. A frame of
// M = S*N samples is written into one half of the buffer (four banks) while
// the previous frame is read from the other half (four banks): 8 RAM blocks
// of 2**(K-2) words each. Every sample gets a linear address a = k*S + s
// (bin k, stream s), the position it has in the natural-order output.
//   write: stage-K clock t, lane {l1,l0} -> idx = l1*2**(n-1) + (t>>log2s)*2
//          + l0, k = bitrev_n(idx), s = t mod S.
//   read : output sample r (four per clock) is address a = r in natural order,
//          or a = bitrev_n(r >> log2s)*S + (r mod S) in bit-reversed order.
// Bank = a[1:0] XOR g(a), word = a >> 2, with
//   S = 1: g = {a[n-1], a[n-2]},  S = 2: g = {a[n], a[n]},
//   S = 4: g = {a[2], a[n+1]}.
// This spreads the four samples of every write clock and of every read clock
// over the four banks, so each bank needs one write and one read port.
// Reading of a frame starts the clock after its last word is written.
// Timing: the first output word of a frame appears M/4 + 3 clocks after the
// frame's first input word; one word per lane per clock.
module output_reorder
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
  output logic   first_out,
  output logic   last_out
);

  localparam int AW = K - 2;           // word address inside a bank
  localparam int CB = K - 2;           // clock counter within a frame
  localparam int W  = $bits(cplx_t);

  logic [CB-1:0] beats_m1;             // M/4 - 1
  assign beats_m1 = CB'((32'(1) << (cfg.log2n + 5'(cfg.log2s) - 5'd2)) - 1);

  function automatic logic [1:0] bank_of(input logic [K-1:0] a, input cfg_t c);
    logic [K+1:0] ax;
    logic [1:0]   g;
    ax = (K+2)'(a);
    case (c.log2s)
      2'd1:    g = {ax[c.log2n], ax[c.log2n]};
      2'd2:    g = {ax[2], ax[c.log2n + 5'd1]};
      default: g = {ax[c.log2n - 5'd1], ax[c.log2n - 5'd2]};
    endcase
    return a[1:0] ^ g;
  endfunction

  // ---------------- write side ----------------
  logic [CB-1:0] wt, wt_eff;
  logic          wh, wh_eff;        // half being written
  logic [K-1:0]  wa   [LANES];
  logic [1:0]    wb   [LANES];
  logic          we   [2][LANES];
  logic [AW-1:0] wadr [LANES];
  logic [W-1:0]  wdat [LANES];

  always_comb begin
    wt_eff = first_in ? '0 : wt;
    wh_eff = first_in ? ~wh : wh;
    for (int l = 0; l < LANES; l++) begin
      logic [K-1:0] idx, kk, st;
      idx = (K'(l >> 1) << (cfg.log2n - 5'd1)) | (K'(wt_eff >> cfg.log2s) << 1) | K'(l & 1);
      kk  = K'(bitrev(32'(idx), cfg.log2n));
      st  = K'(wt_eff) & ((K'(1) << cfg.log2s) - 1'b1);
      wa[l] = (kk << cfg.log2s) | st;
      wb[l] = bank_of(wa[l], cfg);
    end
    for (int b = 0; b < LANES; b++) begin
      wadr[b] = '0;
      wdat[b] = '0;
      we[0][b] = 1'b0;
      we[1][b] = 1'b0;
      for (int l = 0; l < LANES; l++)
        if (wb[l] == 2'(b)) begin
          wadr[b] = AW'(wa[l] >> 2);
          wdat[b] = din[l];
          we[wh_eff][b] = valid_in;
        end
    end
  end

  // job hand-over from the write side to the read side
  logic job_set, pend, pend_half;
  assign job_set = valid_in && (wt_eff == beats_m1);

  always_ff @(posedge clk) begin
    if (rst) begin
      wt <= '0;
      wh <= 1'b1;
    end else begin
      if (valid_in) wt <= wt_eff + 1'b1;
      wh <= wh_eff;
    end
  end

  // ---------------- read side ----------------
  logic          rbusy, rh;
  logic [CB-1:0] rc;
  logic          start;
  logic [K-1:0]  ra   [LANES];
  logic [1:0]    rb   [LANES];
  logic [AW-1:0] radr [2][LANES];

  // a pending frame starts as soon as the previous read is in its last clock
  assign start = pend && (!rbusy || rc == beats_m1);

  always_ff @(posedge clk) begin
    if (rst) begin
      pend      <= 1'b0;
      pend_half <= 1'b0;
      rbusy     <= 1'b0;
      rh        <= 1'b0;
      rc        <= '0;
    end else begin
      if (start) begin
        rbusy <= 1'b1;
        rh    <= pend_half;
        rc    <= '0;
      end else if (rbusy) begin
        if (rc == beats_m1) rbusy <= 1'b0;
        rc <= rc + 1'b1;
      end
      if (job_set) begin
        pend      <= 1'b1;
        pend_half <= wh_eff;
      end else if (start) begin
        pend <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      logic [K-1:0] r, st;
      r  = (K'(rc) << 2) | K'(j);
      st = r & ((K'(1) << cfg.log2s) - 1'b1);
      if (cfg.natural) ra[j] = r;
      else ra[j] = (K'(bitrev(32'(r >> cfg.log2s), cfg.log2n)) << cfg.log2s) | st;
      rb[j] = bank_of(ra[j], cfg);
    end
    for (int b = 0; b < LANES; b++) begin
      radr[0][b] = '0;
      for (int j = 0; j < LANES; j++)
        if (rb[j] == 2'(b)) radr[0][b] = AW'(ra[j] >> 2);
      radr[1][b] = radr[0][b];
    end
  end

  // ---------------- the eight RAM blocks ----------------
  logic [W-1:0] rdat [2][LANES];
  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar b = 0; b < LANES; b++) begin : g_bank
      bank_ram #(.W(W), .AW(AW)) u_ram (
        .clk, .we(we[h][b]), .waddr(wadr[b]), .wdata(wdat[b]),
        .raddr(radr[h][b]), .rdata(rdat[h][b]));
    end
  end

  // ---------------- read crossbar and output register ----------------
  logic       v1, f1, l1, h1;
  logic [1:0] sel1 [LANES];

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
      valid_out <= 1'b0; first_out <= 1'b0; last_out <= 1'b0;
    end else begin
      v1 <= rbusy;
      f1 <= rbusy && (rc == '0);
      l1 <= rbusy && (rc == beats_m1);
      valid_out <= v1;
      first_out <= f1;
      last_out  <= l1;
    end
  end

  always_ff @(posedge clk) begin
    h1 <= rh;
    for (int j = 0; j < LANES; j++) sel1[j] <= rb[j];
    for (int j = 0; j < LANES; j++) dout[j] <= rdat[h1][sel1[j]];
  end

endmodule
