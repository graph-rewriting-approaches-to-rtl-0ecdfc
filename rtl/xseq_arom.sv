// xseq_arom - iterate X_n = X_{n-1} + f(X_{n-1}) with an asynchronous ROM.
//
// This is the easy-to-design original: a multiplexer chooses the start value
// x0 while load is 1 and the fed-back X_n otherwise; an AROM holding f turns
// the chosen value m into f(m) in the same cycle, an adder forms m + f(m), and
// one register R closes the loop.  One new X is produced per clock: if load is
// high in the cycle before edge k, xn shows X_1 after edge k, X_2 after edge
// k+1, and so on.  Widths are W bits, arithmetic modulo 2^W.  The load input
// that drives the multiplexer select is this design's choice.
module xseq_arom #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] x0,
  output logic [W-1:0] xn
);
  logic [W-1:0] m, fm, sum;

  assign m   = load ? x0 : xn;
  arom #(.W(W), .SEED(SEED)) u_f (.d(m), .q(fm));
  assign sum = m + fm;
  reg_r #(.W(W)) u_r (.clk, .rst, .d(sum), .q(xn));
endmodule
