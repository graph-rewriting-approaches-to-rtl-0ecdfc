// layered_srom - an SROM circuit as rewriting leaves it, with optional
// pipeline registers cut in at two layers to shorten its longest path.
//
// Three inputs each address an SROM (S1, S2, S3).  S1 -> R -> CC_A.  S2 and S3
// feed CC_B, which drives CC_A, a register R toward CC_C, and CC_D.  CC_A
// drives SROM S4 (out1) and CC_C; CC_C drives SROM S5 (out2); CC_D drives
// SROM S6 (out3).  With LAYER_REGS = 0 the longest combinational path runs
// S3 -> CC_B -> CC_A -> CC_C -> S5.  With LAYER_REGS = 1 (default) a register
// is added on every edge crossing two cut lines: after S1, S2 and S3, and on
// the four edges into S4, into CC_C from CC_A, into CC_C from the existing R,
// and into S6.  Every input-to-output path gains exactly two registers, so
// the outputs are those of the LAYER_REGS = 0 circuit delayed by two clocks,
// while no combinational path crosses more than one layer of CCs.  CC
// functions and ROM contents (seeds 10-15) are this design's choice.
module layered_srom
  import a2s_pkg::*;
#(
  parameter int unsigned W          = a2s_pkg::DEFAULT_W,
  parameter bit          LAYER_REGS = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  output logic [W-1:0] out1,
  output logic [W-1:0] out2,
  output logic [W-1:0] out3
);
  logic [W-1:0] s1, s2, s3;            // SROM outputs, first row
  logic [W-1:0] s1c, s2c, s3c;         // after layer 1
  logic [W-1:0] s1_r;                  // the circuit's own register after S1
  logic [W-1:0] b_left, b_mid, b_right, b_mid_r;
  logic [W-1:0] a_rom, a_mid, d_out;
  logic [W-1:0] a_romc, a_midc, b_mid_rc, d_outc;   // after layer 2
  logic [W-1:0] c_out;

  srom #(.W(W), .SEED(10)) u_s1 (.clk, .rst, .d(in1), .q(s1));
  srom #(.W(W), .SEED(11)) u_s2 (.clk, .rst, .d(in2), .q(s2));
  srom #(.W(W), .SEED(12)) u_s3 (.clk, .rst, .d(in3), .q(s3));

  if (LAYER_REGS) begin : g_layer1
    reg_r #(.W(W)) u_c1 (.clk, .rst, .d(s1), .q(s1c));
    reg_r #(.W(W)) u_c2 (.clk, .rst, .d(s2), .q(s2c));
    reg_r #(.W(W)) u_c3 (.clk, .rst, .d(s3), .q(s3c));
  end else begin : g_nolayer1
    assign s1c = s1;
    assign s2c = s2;
    assign s3c = s3;
  end

  reg_r #(.W(W)) u_r1 (.clk, .rst, .d(s1c), .q(s1_r));

  assign b_left  = W'(lay_b_left (32'(s2c), 32'(s3c)));
  assign b_mid   = W'(lay_b_mid  (32'(s2c), 32'(s3c)));
  assign b_right = W'(lay_b_right(32'(s2c), 32'(s3c)));
  reg_r #(.W(W)) u_rb (.clk, .rst, .d(b_mid), .q(b_mid_r));

  assign a_rom = W'(lay_a_rom(32'(s1_r), 32'(b_left)));
  assign a_mid = W'(lay_a_mid(32'(s1_r), 32'(b_left)));
  assign d_out = W'(lay_d(32'(b_right)));

  if (LAYER_REGS) begin : g_layer2
    reg_r #(.W(W)) u_c4 (.clk, .rst, .d(a_rom),   .q(a_romc));
    reg_r #(.W(W)) u_c5 (.clk, .rst, .d(a_mid),   .q(a_midc));
    reg_r #(.W(W)) u_c6 (.clk, .rst, .d(b_mid_r), .q(b_mid_rc));
    reg_r #(.W(W)) u_c7 (.clk, .rst, .d(d_out),   .q(d_outc));
  end else begin : g_nolayer2
    assign a_romc   = a_rom;
    assign a_midc   = a_mid;
    assign b_mid_rc = b_mid_r;
    assign d_outc   = d_out;
  end

  assign c_out = W'(lay_c(32'(a_midc), 32'(b_mid_rc)));

  srom #(.W(W), .SEED(13)) u_s4 (.clk, .rst, .d(a_romc), .q(out1));
  srom #(.W(W), .SEED(14)) u_s5 (.clk, .rst, .d(c_out),  .q(out2));
  srom #(.W(W), .SEED(15)) u_s6 (.clk, .rst, .d(d_outc), .q(out3));
endmodule
