// arom - asynchronous-read ROM (AROM).
//
// 2^W words of W bits; word i holds a2s_pkg::rom_word(SEED, i).  The output
// follows the address combinationally, q = M[d], with no clock and no reset:
// for addresses d0, d1, ... the output sequence is <M[d0], M[d1], ...>.
// This is the memory that FPGA block RAMs do not offer; it maps to LUTs.
module arom #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 0
) (
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] mem [2**W];

  initial begin
    for (int i = 0; i < 2**W; i++) mem[i] = W'(a2s_pkg::rom_word(SEED, i));
  end

  assign q = mem[d];
endmodule
