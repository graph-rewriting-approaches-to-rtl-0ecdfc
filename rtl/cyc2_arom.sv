// cyc2_arom - cycle example in which the asynchronous ROM is inside the loop.
//
// in -> CC_U -> AROM -> CC_D -> out, and CC_D -> R -> CC_U closes the loop.
// The loop holds one register and one AROM, so it balances, but the output is
// taken straight after the AROM and is one register short: this circuit has
// no exactly equivalent SROM version (cyc2_arom_padded adds the register).
// out is combinational from in and R.  CC functions come from a2s_pkg and are
// this design's choice.
module cyc2_arom
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] u, m, fb, fb_d;

  assign u = W'(cyc2_top(32'(in), 32'(fb_d)));
  arom  #(.W(W), .SEED(5)) u_rom (.d(u), .q(m));
  assign fb  = W'(cyc2_fb (32'(m)));
  assign out = W'(cyc2_out(32'(m)));
  reg_r #(.W(W))           u_r   (.clk, .rst, .d(fb), .q(fb_d));
endmodule
