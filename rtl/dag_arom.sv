// dag_arom - acyclic example circuit with two asynchronous ROMs.
//
// Left column: in1 -> AROM -> R -> CC_L -> R -> out1.  Right column:
// in2 -> AROM -> CC_T -> R -> CC_B -> out2.  CC_T also feeds CC_L, and CC_L
// also feeds CC_B.  Counting +1 per register and -1 per AROM along the paths,
// out1 ends at 0 and out2 at -1: out2 has no register to spare, so this
// circuit cannot be rewritten into an exactly equivalent SROM circuit
// (dag_arom_padded adds the missing register).  out1 is registered; out2 is
// combinational from in2 (through the AROM) and from registers.  The CC
// functions come from a2s_pkg and are this design's choice.
module dag_arom
  import a2s_pkg::*;
#(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2
);
  logic [W-1:0] m1, m2, r1, t_left, t_down, r3, l_out, l_right;

  arom  #(.W(W), .SEED(2)) u_rom1 (.d(in1), .q(m1));
  reg_r #(.W(W))           u_r1   (.clk, .rst, .d(m1), .q(r1));

  arom  #(.W(W), .SEED(3)) u_rom2 (.d(in2), .q(m2));
  assign t_left = W'(dag_t_left(32'(m2)));
  assign t_down = W'(dag_t_down(32'(m2)));
  reg_r #(.W(W))           u_r3   (.clk, .rst, .d(t_down), .q(r3));

  assign l_out   = W'(dag_l_out  (32'(r1), 32'(t_left)));
  assign l_right = W'(dag_l_right(32'(r1), 32'(t_left)));
  reg_r #(.W(W))           u_r2   (.clk, .rst, .d(l_out), .q(out1));

  assign out2 = W'(dag_b(32'(r3), 32'(l_right)));
endmodule
