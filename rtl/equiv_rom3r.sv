// equiv_rom3r - three interchangeable two-clock ROM read paths used for
// circuits with loops: SROM then register, register then SROM, and
// register, AROM, register.
//
// All three read the same table (rom_word(SEED, i)) from address input d.
// For addresses d0, d1, ... after reset each output is
//   <0, 0, M[d0], M[d1], ...>
// (the middle form would show M[0] at time 1, which the table used here makes
// 0).  The equality lets a register move from one side of an SROM to the
// other.  Structure as in the source; widths and table contents are this
// design's choice.
module equiv_rom3r #(
  parameter int unsigned W    = a2s_pkg::DEFAULT_W,
  parameter int unsigned SEED = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q_s_r,
  output logic [W-1:0] q_r_s,
  output logic [W-1:0] q_r_a_r
);
  logic [W-1:0] s1, d_r2, d_r3, m3;

  srom  #(.W(W), .SEED(SEED)) u_s1   (.clk, .rst, .d, .q(s1));
  reg_r #(.W(W))              u_r1   (.clk, .rst, .d(s1), .q(q_s_r));

  reg_r #(.W(W))              u_r2   (.clk, .rst, .d, .q(d_r2));
  srom  #(.W(W), .SEED(SEED)) u_s2   (.clk, .rst, .d(d_r2), .q(q_r_s));

  reg_r #(.W(W))              u_r3a  (.clk, .rst, .d, .q(d_r3));
  arom  #(.W(W), .SEED(SEED)) u_rom3 (.d(d_r3), .q(m3));
  reg_r #(.W(W))              u_r3b  (.clk, .rst, .d(m3), .q(q_r_a_r));
endmodule
