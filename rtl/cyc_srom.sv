// cyc_srom - AROM-free equivalent of cyc_arom.
//
// Rewriting turned the AROM into SROM + negative register, moved the register
// of the loop through the lower CC onto its two outputs, moved the negative
// register through the upper CC (adding a register on the feedback input)
// and cancelled each negative register against a register.  What remains:
// in -> SROM -> CC_U -> CC_D -> out, with CC_D -> R -> CC_U closing the loop.
// The register now sits on the feedback edge; out is combinational from the
// SROM output and R.  The output sequence equals that of cyc_arom cycle for
// cycle, including the first cycles after reset.
module cyc_srom
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] s, u, fb, fb_d;

  srom  #(.W(W), .SEED(4)) u_rom (.clk, .rst, .d(in), .q(s));
  assign u   = W'(cyc_top(32'(s), 32'(fb_d)));
  assign fb  = W'(cyc_fb (32'(u)));
  assign out = W'(cyc_out(32'(u)));
  reg_r #(.W(W))           u_r   (.clk, .rst, .d(fb), .q(fb_d));
endmodule
