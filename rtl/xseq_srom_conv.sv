// xseq_srom_conv - X_n = X_{n-1} + f(X_{n-1}) with a synchronous ROM, in the
// form the rewriting rules produce from xseq_arom.
//
// The AROM becomes an SROM followed by a "negative register"; that negative
// register cancels against the loop register, and a register appears on the
// other adder input instead.  What is left: the multiplexer output m goes
// into an SROM and, in parallel, into a register R; the adder sums the two,
// and the adder output is X_n directly and is fed back to the multiplexer.
// The only loop state is the SROM's output register and R, so one X is
// produced per clock with exactly the timing of xseq_arom: with load high in
// the cycle before edge k, xn shows X_1 after edge k.  xn is combinational
// from the two registers (longer path than xseq_arom, same cycle count).
module xseq_srom_conv #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] x0,
  output logic [W-1:0] xn
);
  logic [W-1:0] m, m_d, fm;

  assign m = load ? x0 : xn;
  reg_r #(.W(W))             u_rm (.clk, .rst, .d(m), .q(m_d));
  srom  #(.W(W), .SEED(SEED)) u_f  (.clk, .rst, .d(m), .q(fm));
  assign xn = m_d + fm;
endmodule
