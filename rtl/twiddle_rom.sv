// Twiddle ROM of one FFT stage.
//
// Entry a holds W^(a * 2**STEP_LOG2) of a 2**K-point transform,
//   W^e = cos(2*pi*e/2**K) - j*sin(2*pi*e/2**K),
// for a = 0 .. 2**ABITS-1, rounded to TW-bit signed parts with TFRAC fraction
// bits. With K = 16 the first stage stores W_65536^0..W_65536^32767
// (ABITS = 15, STEP_LOG2 = 0), which covers the first stage of every
// supported size; stage s >= 2 stores only the 2**(16-s) values it uses
// (ABITS = 16-s, STEP_LOG2 = s-1), so all ROMs together hold about N words.
// The contents are computed when the ROM is initialised, not read from a file.
// Two synchronous read ports (the first stage needs two twiddles a clock);
// data appear one clock after the address.
module twiddle_rom
  import hcfft_pkg::*;
#(
  parameter int K         = 16,
  parameter int ABITS     = 15,
  parameter int STEP_LOG2 = 0
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr_a,
  input  logic [ABITS-1:0] addr_b,
  output twid_t            q_a,
  output twid_t            q_b
);

  twid_t rom [2**ABITS];

  initial begin
    for (int a = 0; a < 2**ABITS; a++) begin
      real ang;
      ang = 2.0 * 3.14159265358979323846 * real'(a) * real'(2**STEP_LOG2) / real'(2**K);
      rom[a].re = TW'($rtoi($floor($cos(ang) * real'(2**TFRAC) + 0.5)));
      rom[a].im = TW'($rtoi($floor(-$sin(ang) * real'(2**TFRAC) + 0.5)));
    end
  end

  always_ff @(posedge clk) begin
    q_a <= rom[addr_a];
    q_b <= rom[addr_b];
  end

endmodule
