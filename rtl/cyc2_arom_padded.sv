// cyc2_arom_padded - cyc2_arom with a register R in front of its output.
//
// The added register makes the output path balance, so the circuit can be
// rewritten into the AROM-free cyc2_srom; it differs from cyc2_arom only by
// one clock of output latency.
module cyc2_arom_padded #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] out_c;
  cyc2_arom #(.W(W)) u_cyc (.clk, .rst, .in, .out(out_c));
  reg_r     #(.W(W)) u_pad (.clk, .rst, .d(out_c), .q(out));
endmodule
