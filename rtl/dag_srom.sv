// dag_srom - AROM-free equivalent of dag_arom_padded, using synchronous ROMs.
//
// Obtained by rewriting: each AROM became SROM + negative register; the
// negative registers were pushed through the CCs toward the outputs, each
// push adding a register on the CC's other inputs, and every negative
// register met and cancelled a real one.  Result: in1 -> SROM -> R -> CC_L ->
// out1; in2 -> SROM -> CC_T; CC_T -> CC_L directly; CC_T -> R -> CC_B;
// CC_L -> CC_B -> out2.  Both outputs are now combinational from registers
// and give, cycle for cycle, the same sequences as dag_arom_padded.  Same CC
// functions and ROM contents as dag_arom.
module dag_srom
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
  logic [W-1:0] s1, s1_d, s2, t_left, t_down, t_down_d, l_right;

  srom  #(.W(W), .SEED(2)) u_rom1 (.clk, .rst, .d(in1), .q(s1));
  reg_r #(.W(W))           u_r1   (.clk, .rst, .d(s1), .q(s1_d));

  srom  #(.W(W), .SEED(3)) u_rom2 (.clk, .rst, .d(in2), .q(s2));
  assign t_left = W'(dag_t_left(32'(s2)));
  assign t_down = W'(dag_t_down(32'(s2)));
  reg_r #(.W(W))           u_r3   (.clk, .rst, .d(t_down), .q(t_down_d));

  assign out1    = W'(dag_l_out  (32'(s1_d), 32'(t_left)));
  assign l_right = W'(dag_l_right(32'(s1_d), 32'(t_left)));
  assign out2    = W'(dag_b(32'(t_down_d), 32'(l_right)));
endmodule
