// cyc_arom - example circuit with a cycle and one asynchronous ROM.
//
// in -> AROM -> CC_U -> R -> CC_D -> out, and CC_D also feeds back into CC_U.
// The register R is the only state: R <= CC_U(M[in], fb(R)) each clock, and
// out = CC_D(R) is combinational from R.  The ROM sits outside the loop, one
// register short on the way to the output but compensated by the register in
// the loop, so the circuit can be rewritten into cyc_srom.  CC functions come
// from a2s_pkg and are this design's choice.
module cyc_arom
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] m, u, x, fb;

  arom  #(.W(W), .SEED(4)) u_rom (.d(in), .q(m));
  assign u   = W'(cyc_top(32'(m), 32'(fb)));
  reg_r #(.W(W))           u_r   (.clk, .rst, .d(u), .q(x));
  assign fb  = W'(cyc_fb (32'(x)));
  assign out = W'(cyc_out(32'(x)));
endmodule
