// drg_srom - AROM-free equivalent of drg_arom.
//
// Rewriting replaces every AROM by SROM + negative register.  Register and
// SROM swap places on the B path (in -> SROM_B -> R); the negative registers
// are pushed through the adder, adding a register on the counter input, and
// the output register cancels them.  Result: the adder sums SROM_A[in],
// R(SROM_B[in]), R(counter) and SROM_C[out], and its output is out directly
// and also addresses SROM_C.  out is combinational from registers only and
// equals the output of drg_arom cycle for cycle.
module drg_srom #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [W-1:0] cnt, cnt_d, sa, sb, sb_d, sc;

  counter_inc #(.W(W)) u_cnt (.clk, .rst, .cnt);
  reg_r #(.W(W))           u_rcnt  (.clk, .rst, .d(cnt), .q(cnt_d));

  srom  #(.W(W), .SEED(6)) u_rom_a (.clk, .rst, .d(in), .q(sa));
  srom  #(.W(W), .SEED(7)) u_rom_b (.clk, .rst, .d(in), .q(sb));
  reg_r #(.W(W))           u_rsb   (.clk, .rst, .d(sb), .q(sb_d));
  srom  #(.W(W), .SEED(8)) u_rom_c (.clk, .rst, .d(out), .q(sc));

  assign out = sa + sb_d + cnt_d + sc;
endmodule
