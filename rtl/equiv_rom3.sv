// equiv_rom3 - the three interchangeable ROM read paths behind the rewriting
// rules: SROM, register followed by AROM, and AROM followed by register.
//
// All three read the same table (rom_word(SEED, i)) from the same address
// input d.  For addresses d0, d1, ... after reset:
//   q_srom  = <0,    M[d0], M[d1], ...>
//   q_r_a   = <M[0], M[d0], M[d1], ...>   (R then AROM)
//   q_a_r   = <0,    M[d0], M[d1], ...>   (AROM then R)
// They agree from time 1 on; at time 0 the R-then-AROM path shows M[0], which
// the table used here makes 0 as well.  This equality is what lets an AROM be
// replaced by an SROM wherever a register can be taken from its input or
// output side.  The structure follows the source; widths (W for address and
// word alike) and table contents are this design's choice.
module equiv_rom3 #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_srom,
  output logic [W-1:0] q_r_a,
  output logic [W-1:0] q_a_r
);
  logic [W-1:0] d_r, m;

  srom  #(.W(W), .SEED(SEED)) u_srom (.clk, .rst, .d, .q(q_srom));

  reg_r #(.W(W))              u_r1   (.clk, .rst, .d, .q(d_r));
  arom  #(.W(W), .SEED(SEED)) u_rom1 (.d(d_r), .q(q_r_a));

  arom  #(.W(W), .SEED(SEED)) u_rom2 (.d, .q(m));
  reg_r #(.W(W))              u_r2   (.clk, .rst, .d(m), .q(q_a_r));
endmodule
