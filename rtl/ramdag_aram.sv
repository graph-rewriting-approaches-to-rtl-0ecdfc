// ramdag_aram - acyclic example circuit with three asynchronous-read RAMs.
//
// Two ARAMs are driven straight from the ports (we1/a1/d1 and we2/a2/d2).
// Left: ARAM1 -> R -> CC_L.  Right: ARAM2 -> CC_T -> R -> CC_B -> R -> out2,
// with CC_T also feeding CC_L.  CC_L computes write enable, address and data
// of ARAM3, whose read port is out1, and also feeds CC_B.  The path
// ARAM2 -> CC_T -> CC_L -> ARAM3 -> out1 has two ARAMs and no register
// (potentiality -2), so out1 is two registers short of an SRAM-only version
// (see ramdag_aram_padded).  All RAMs
// start at zero and write at the rising edge when their we is 1 (never while
// rst is 1); reads are combinational.  CC functions come from a2s_pkg and are this design's choice.
module ramdag_aram
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
  logic [W-1:0] a3, d3, l_right, b;

  aram  #(.W(W)) u_ram1 (.clk, .rst, .we(we1), .a(a1), .dat(d1), .q(q1));
  reg_r #(.W(W)) u_r1   (.clk, .rst, .d(q1), .q(q1_d));

  aram  #(.W(W)) u_ram2 (.clk, .rst, .we(we2), .a(a2), .dat(d2), .q(q2));
  assign t_left = W'(rd_t_left(32'(q2)));
  assign t_down = W'(rd_t_down(32'(q2)));
  reg_r #(.W(W)) u_r2   (.clk, .rst, .d(t_down), .q(t_down_d));

  assign we3     = rd_l_we   (32'(q1_d), 32'(t_left));
  assign a3      = W'(rd_l_addr (32'(q1_d), 32'(t_left)));
  assign d3      = W'(rd_l_data (32'(q1_d), 32'(t_left)));
  assign l_right = W'(rd_l_right(32'(q1_d), 32'(t_left)));
  aram  #(.W(W)) u_ram3 (.clk, .rst, .we(we3), .a(a3), .dat(d3), .q(out1));

  assign b = W'(rd_b(32'(t_down_d), 32'(l_right)));
  reg_r #(.W(W)) u_r3   (.clk, .rst, .d(b), .q(out2));
endmodule
