// dag_arom_padded - dag_arom with one register R added in front of out2.
//
// out2 of dag_arom sits one register short of what an SROM circuit needs.
// Adding a register before that output gives a circuit that differs from the
// original only by one clock of latency on out2 and that the rewriting rules
// turn into the AROM-free dag_srom.  out1 is unchanged.
module dag_arom_padded #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2
);
  logic [W-1:0] out2_c;
  dag_arom #(.W(W)) u_dag (.clk, .rst, .in1, .in2, .out1, .out2(out2_c));
  reg_r    #(.W(W)) u_pad (.clk, .rst, .d(out2_c), .q(out2));
endmodule
