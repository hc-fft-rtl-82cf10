// One RAM block of the output reorder buffer: simple dual-port RAM, one write
// port and one synchronous read port (read data one clock after the address).
// Contents are not reset.
module bank_ram #(
  parameter int W  = 32,
  parameter int AW = 14
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
