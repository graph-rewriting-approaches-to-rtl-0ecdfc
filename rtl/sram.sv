// sram - synchronous-read, synchronous-write RAM (SRAM), as in a block RAM.
//
// 2^W words of W bits, all 0 at start.  At each rising clock edge the address
// a is sampled: with we = 1, M[a] <= dat, and q is loaded with the word at a.
// RAW = 0 (default) is write-after-read: q gets the word as it was before the
// write.  RAW = 1 is read-after-write: q gets the newly written data.  While
// rst is 1 at an edge q is cleared to 0; the memory keeps its contents and
// ignores writes (the latter is this design's choice, matching aram).
// With addresses 1,2,3,1,2,3, data 11,12,13 and we = 1 for the first three
// cycles the output is 0,0,0,0,11,12 (WAR) or 0,11,12,13,11,12 (RAW).
module sram #(
  parameter int unsigned W   = a2s_pkg::DEFAULT_W,
  parameter bit          RAW = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] a,
  input  logic [W-1:0] dat,
  output logic [W-1:0] q
);
  logic [W-1:0] mem [2**W];

  initial begin
    for (int i = 0; i < 2**W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && !rst) mem[a] <= dat;
  end

  always_ff @(posedge clk) begin
    if (rst)             q <= '0;
    else if (RAW && we)  q <= dat;
    else                 q <= mem[a];
  end
endmodule
