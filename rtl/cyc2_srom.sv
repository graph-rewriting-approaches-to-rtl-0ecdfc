// cyc2_srom - AROM-free equivalent of cyc2_arom_padded.
//
// The AROM became SROM + negative register; the negative register moved
// through the lower CC onto both of its outputs, where one cancelled the
// loop register and the other cancelled the output register.  Result:
// in -> CC_U -> SROM -> CC_D -> out, and CC_D feeds CC_U directly.  The SROM
// is now the only state in the loop, and out is combinational from the SROM
// output.  Same output sequence as cyc2_arom_padded, cycle for cycle.
module cyc2_srom
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] u, s, fb;

  assign u = W'(cyc2_top(32'(in), 32'(fb)));
  srom  #(.W(W), .SEED(5)) u_rom (.clk, .rst, .d(u), .q(s));
  assign fb  = W'(cyc2_fb (32'(s)));
  assign out = W'(cyc2_out(32'(s)));
endmodule
