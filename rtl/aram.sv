// aram - asynchronous-read, synchronous-write RAM (ARAM).
//
// 2^W words of W bits, all 0 at start.  Write: at a rising clock edge with
// we = 1, M[a] <= dat.  Read: q = M[a] at all times, combinationally, so a word
// written at an edge is visible on q right after that edge.  The clock serves
// the write only; there is no reset of the contents, but writes are blocked
// while rst is 1 so that a write enable computed from not-yet-reset registers
// cannot corrupt a word (this design's choice: the reset in the original
// circuits reaches the registers only).  Data and address share the width W,
// a simplification chosen here.
module aram #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
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

  assign q = mem[a];
endmodule
