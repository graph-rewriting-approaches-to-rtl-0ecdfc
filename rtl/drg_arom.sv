// drg_arom - circuit with a feedback loop through an asynchronous ROM, fed by
// a data input and by an input-less counter.
//
// A four-input adder sums: AROM_A[in]; AROM_B[in delayed by a register R];
// the counter value; and AROM_C[out].  The sum is registered to give out,
// and out addresses AROM_C, closing the loop.  So
// out(t+1) = A[in(t)] + B[in(t-1)] + cnt(t) + C[out(t)], modulo 2^W.
// out is registered.  ROM contents come from a2s_pkg (seeds 6, 7, 8).
module drg_arom #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] cnt, in_d, ma, mb, mc, sum;

  counter_inc #(.W(W)) u_cnt (.clk, .rst, .cnt);

  arom  #(.W(W), .SEED(6)) u_rom_a (.d(in), .q(ma));
  reg_r #(.W(W))           u_rin   (.clk, .rst, .d(in), .q(in_d));
  arom  #(.W(W), .SEED(7)) u_rom_b (.d(in_d), .q(mb));
  arom  #(.W(W), .SEED(8)) u_rom_c (.d(out), .q(mc));

  assign sum = ma + mb + cnt + mc;
  reg_r #(.W(W))           u_rout  (.clk, .rst, .d(sum), .q(out));
endmodule
