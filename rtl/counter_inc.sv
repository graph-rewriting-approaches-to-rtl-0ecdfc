// counter_inc - input-less counter: a register R and an adder that adds one.
//
// After reset the output runs 0, 1, 2, ... (modulo 2^W), one step per clock.
// With no data input, it serves as a "dummy input" to another circuit: its
// output sequence is fixed, like that of an input port, so a rewrite may
// treat it as one.
module counter_inc #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] cnt
);
  logic [W-1:0] nxt;
  assign nxt = cnt + W'(1);
  reg_r #(.W(W)) u_r (.clk, .rst, .d(nxt), .q(cnt));
endmodule
