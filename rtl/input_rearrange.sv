// Input rearrangement: turns the natural input order into the order the first
// FFT stage needs.
//
// Input: four consecutive samples per clock, sample q on lane q mod 4 at clock
// q / 4 (with S streams, q = S*n + stream). The circuit is a chain of pairs of
// shuffle blocks of fixed lengths 1, 2, 4, ..., 2**(K-3) (28 blocks for
// K = 16); between two links lanes 1 and 2 are swapped. The output is taken
// after the shuffle of length S*N/8, chosen at run time, where it carries
// x[t], x[t+N/2], x[t+N/4], x[t+3N/4] on lanes 0..3 (stream interleaving kept
// in the time order). Valid flags are not passed into the links behind the
// tap.
// Timing: latency S*N/4 - 1 clocks (sum of the lengths up to the tap).
module input_rearrange
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

  localparam int NL = K - 2;   // links: lengths 2**0 .. 2**(K-3)

  logic [5:0] tap;             // link whose output feeds the first stage
  assign tap = 6'(cfg.log2n) + 6'(cfg.log2s) - 6'd3;

  lanes_t l_in  [NL];
  lanes_t l_out [NL];
  logic   v_in  [NL];
  logic   v_out [NL];
  logic   f_in  [NL];
  logic   f_out [NL];

  for (genvar j = 0; j < NL; j++) begin : g_link
    localparam int L  = 2**j;
    localparam int LW = $clog2(L + 1);
    logic sv1, sf1;
    if (j == 0) begin : g_head
      assign l_in[j] = din;
      assign v_in[j] = valid_in;
      assign f_in[j] = first_in;
    end else begin : g_next
      // nothing valid enters links behind the tap, so no stale frame can
      // surface there after a switch to a larger size
      assign l_in[j] = swap12(l_out[j-1]);
      assign v_in[j] = v_out[j-1] && (6'(j) <= tap);
      assign f_in[j] = f_out[j-1] && (6'(j) <= tap);
    end
    shuffle #(.DEPTH(L), .LW(LW)) u_sh0 (
      .clk, .rst, .len(LW'(L)),
      .up_in(l_in[j][0]), .lo_in(l_in[j][1]),
      .valid_in(v_in[j]), .first_in(f_in[j]),
      .up_out(l_out[j][0]), .lo_out(l_out[j][1]),
      .valid_out(v_out[j]), .first_out(f_out[j]));
    shuffle #(.DEPTH(L), .LW(LW)) u_sh1 (
      .clk, .rst, .len(LW'(L)),
      .up_in(l_in[j][2]), .lo_in(l_in[j][3]),
      .valid_in(v_in[j]), .first_in(f_in[j]),
      .up_out(l_out[j][2]), .lo_out(l_out[j][3]),
      .valid_out(sv1), .first_out(sf1));
  end

  // tap after the shuffle of length S*N/8: link log2n + log2s - 3
  always_comb begin
    dout      = l_out[0];
    valid_out = v_out[0];
    first_out = f_out[0];
    for (int j = 0; j < NL; j++)
      if (tap == 6'(j)) begin
        dout      = l_out[j];
        valid_out = v_out[j];
        first_out = f_out[j];
      end
  end

endmodule
