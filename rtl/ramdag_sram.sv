// ramdag_sram - ARAM-free equivalent of ramdag_aram_padded, using
// synchronous-read RAMs in write-after-read mode.
//
// Rewriting replaced each ARAM by SRAM + negative register.  The negative
// registers cancelled the register after RAM1 and the two padding registers,
// and were moved through CC_T, CC_L and the third RAM (a negative register on
// any one RAM input moves to its output while a register is added to the
// other inputs), each move absorbing one real register.  Result:
// SRAM1 -> R -> CC_L; SRAM2 -> CC_T; CC_T -> CC_L directly; CC_T -> R -> CC_B;
// CC_L drives we/A/D of SRAM3, whose output is out1; CC_L -> CC_B -> out2.
// The outputs equal those of ramdag_aram_padded cycle for cycle.  SRAM1 and
// SRAM2 hold the same contents as ARAM1 and ARAM2 at every clock; SRAM3 holds
// the contents ARAM3 had one clock earlier.
module ramdag_sram
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we1,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] d1,
  input  logic         we2,
  input  logic [W-1:0] a2,
  input  logic [W-1:0] d2,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2
);
  logic [W-1:0] q1, q1_d, q2, t_left, t_down, t_down_d;
  logic         we3;
  logic [W-1:0] a3, d3, l_right;

  sram  #(.W(W)) u_ram1 (.clk, .rst, .we(we1), .a(a1), .dat(d1), .q(q1));
  reg_r #(.W(W)) u_r1   (.clk, .rst, .d(q1), .q(q1_d));

  sram  #(.W(W)) u_ram2 (.clk, .rst, .we(we2), .a(a2), .dat(d2), .q(q2));
  assign t_left = W'(rd_t_left(32'(q2)));
  assign t_down = W'(rd_t_down(32'(q2)));
  reg_r #(.W(W)) u_r2   (.clk, .rst, .d(t_down), .q(t_down_d));

  assign we3     = rd_l_we   (32'(q1_d), 32'(t_left));
  assign a3      = W'(rd_l_addr (32'(q1_d), 32'(t_left)));
  assign d3      = W'(rd_l_data (32'(q1_d), 32'(t_left)));
  assign l_right = W'(rd_l_right(32'(q1_d), 32'(t_left)));
  sram  #(.W(W)) u_ram3 (.clk, .rst, .we(we3), .a(a3), .dat(d3), .q(out1));

  assign out2 = W'(rd_b(32'(t_down_d), 32'(l_right)));
endmodule
