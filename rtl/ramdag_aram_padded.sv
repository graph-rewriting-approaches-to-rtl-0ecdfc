// ramdag_aram_padded - ramdag_aram with two registers added in front of out1.
//
// out1 of ramdag_aram is two registers short of what an SRAM-only circuit
// needs.  Two registers before it raise the count to zero; the circuit then
// differs from the original only by two clocks of latency on out1 and can be
// rewritten into ramdag_sram.  out2 and all memories are unchanged.
module ramdag_aram_padded #(
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
  logic [W-1:0] out1_c, out1_p;
  ramdag_aram #(.W(W)) u_dag (.clk, .rst, .we1, .a1, .d1, .we2, .a2, .d2, .out1(out1_c), .out2);
  reg_r       #(.W(W)) u_p1  (.clk, .rst, .d(out1_c), .q(out1_p));
  reg_r       #(.W(W)) u_p2  (.clk, .rst, .d(out1_p), .q(out1));
endmodule
