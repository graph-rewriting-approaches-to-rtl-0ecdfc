// xseq_srom_naive - X_n = X_{n-1} + f(X_{n-1}) with a synchronous ROM, built
// the straightforward way.
//
// Because the SROM needs a clock to deliver f(m), a register R is placed
// beside it so that m and f(m) reach the adder together, and the output
// register of the original is kept.  The loop therefore holds two registers
// and a new X appears only every second clock: with load high in the cycle
// before edge k, xn shows X_1 after edge k+1, X_2 after edge k+3, and so on.
// The other slot of the loop carries an unrelated sequence started from the
// reset value.  This is the two-cycle circuit the rewriting method avoids.
module xseq_srom_naive #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] x0,
  output logic [W-1:0] xn
);
  logic [W-1:0] m, m_d, fm, sum;

  assign m = load ? x0 : xn;
  reg_r #(.W(W))             u_rm (.clk, .rst, .d(m), .q(m_d));
  srom  #(.W(W), .SEED(SEED)) u_f  (.clk, .rst, .d(m), .q(fm));
  assign sum = m_d + fm;
  reg_r #(.W(W))             u_r  (.clk, .rst, .d(sum), .q(xn));
endmodule
