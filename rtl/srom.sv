// srom - synchronous-read ROM (SROM), the ROM an FPGA block RAM provides.
//
// 2^W words of W bits; word i holds a2s_pkg::rom_word(SEED, i), the same
// table as an arom with the same SEED.  The address is sampled at the rising
// clock edge and q holds M[d] from then on; while rst is 1 at an edge, q is
// cleared.  For addresses d0, d1, ... after reset the output sequence is
// <0, M[d0], M[d1], ...>: one clock of read latency.
module srom #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] mem [2**W];

  initial begin
    for (int i = 0; i < 2**W; i++) mem[i] = W'(a2s_pkg::rom_word(SEED, i));
  end

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= mem[d];
  end
endmodule
