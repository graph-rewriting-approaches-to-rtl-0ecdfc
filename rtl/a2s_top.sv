// a2s_top - all example circuits of the asynchronous-to-synchronous memory
// rewriting method, side by side.
//
// Each example appears as the circuit a designer would write with
// asynchronous-read memories (AROM/ARAM), where needed the same circuit with
// registers added in front of outputs that are short of registers, and the
// equivalent circuit made only of registers, combinational logic and
// synchronous-read memories (SROM/SRAM) that FPGA block RAMs implement.  The
// versions of one example share their inputs and bring out their outputs
// separately, so they can be compared cycle by cycle:
//   xs_*   X_n = X_{n-1} + f(X_{n-1}): AROM original, two-cycle SROM version,
//          one-cycle rewritten SROM version
//   dag_*  acyclic circuit with two ROMs (original, padded, rewritten)
//   rd_*   acyclic circuit with three RAMs (original, padded, rewritten)
//   cyc_*  cycle with a ROM before the loop (original, rewritten)
//   cyc2_* cycle with the ROM inside the loop (original, padded, rewritten)
//   drg_*  loop through a ROM plus an input-less counter (original, rewritten)
//   lay_*  SROM circuit without and with two layers of pipeline registers
//   cc_*   the small example gate network F = A&~B | B&C, G = ~(B&C)
//   eq_*   the memory equivalences the rewriting rests on: SROM = R+AROM =
//          AROM+R, SROM+R = R+SROM = R+AROM+R, SRAM = R+ARAM = ARAM+R
// All state resets synchronously on rst; memories keep their contents.
module a2s_top #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  // gate-level CC example
  input  logic         cc_a, cc_b, cc_c,
  output logic         cc_f, cc_g,
  // X_n = X_{n-1} + f(X_{n-1})
  input  logic         xs_load,
  input  logic [W-1:0] xs_x0,
  output logic [W-1:0] xs_xn_arom,
  output logic [W-1:0] xs_xn_naive,
  output logic [W-1:0] xs_xn_conv,
  // acyclic ROM example
  input  logic [W-1:0] dag_in1, dag_in2,
  output logic [W-1:0] dag_out1_arom, dag_out2_arom,
  output logic [W-1:0] dag_out1_pad,  dag_out2_pad,
  output logic [W-1:0] dag_out1_srom, dag_out2_srom,
  // acyclic RAM example
  input  logic         rd_we1, rd_we2,
  input  logic [W-1:0] rd_a1, rd_d1, rd_a2, rd_d2,
  output logic [W-1:0] rd_out1_aram, rd_out2_aram,
  output logic [W-1:0] rd_out1_pad,  rd_out2_pad,
  output logic [W-1:0] rd_out1_sram, rd_out2_sram,
  // cycle, ROM outside the loop
  input  logic [W-1:0] cyc_in,
  output logic [W-1:0] cyc_out_arom, cyc_out_srom,
  // cycle, ROM inside the loop
  input  logic [W-1:0] cyc2_in,
  output logic [W-1:0] cyc2_out_arom, cyc2_out_pad, cyc2_out_srom,
  // loop through a ROM with a counter as dummy input
  input  logic [W-1:0] drg_in,
  output logic [W-1:0] drg_out_arom, drg_out_srom,
  // layered SROM circuit
  input  logic [W-1:0] lay_in1, lay_in2, lay_in3,
  output logic [W-1:0] lay_out1_flat, lay_out2_flat, lay_out3_flat,
  output logic [W-1:0] lay_out1_cut,  lay_out2_cut,  lay_out3_cut,
  // memory equivalences
  input  logic [W-1:0] eq_d,
  output logic [W-1:0] eq_rom_srom, eq_rom_r_a, eq_rom_a_r,
  output logic [W-1:0] eq_rom2_s_r, eq_rom2_r_s, eq_rom2_r_a_r,
  input  logic         eq_we,
  input  logic [W-1:0] eq_a, eq_dat,
  output logic [W-1:0] eq_ram_sram, eq_ram_r_a, eq_ram_a_r
);
  cc_fig33 u_cc (.a(cc_a), .b(cc_b), .c(cc_c), .f(cc_f), .g(cc_g));

  xseq_arom       #(.W(W)) u_xs_arom  (.clk, .rst, .load(xs_load), .x0(xs_x0), .xn(xs_xn_arom));
  xseq_srom_naive #(.W(W)) u_xs_naive (.clk, .rst, .load(xs_load), .x0(xs_x0), .xn(xs_xn_naive));
  xseq_srom_conv  #(.W(W)) u_xs_conv  (.clk, .rst, .load(xs_load), .x0(xs_x0), .xn(xs_xn_conv));

  dag_arom        #(.W(W)) u_dag_arom (.clk, .rst, .in1(dag_in1), .in2(dag_in2), .out1(dag_out1_arom), .out2(dag_out2_arom));
  dag_arom_padded #(.W(W)) u_dag_pad  (.clk, .rst, .in1(dag_in1), .in2(dag_in2), .out1(dag_out1_pad),  .out2(dag_out2_pad));
  dag_srom        #(.W(W)) u_dag_srom (.clk, .rst, .in1(dag_in1), .in2(dag_in2), .out1(dag_out1_srom), .out2(dag_out2_srom));

  ramdag_aram        #(.W(W)) u_rd_aram (.clk, .rst, .we1(rd_we1), .a1(rd_a1), .d1(rd_d1),
                                         .we2(rd_we2), .a2(rd_a2), .d2(rd_d2), .out1(rd_out1_aram), .out2(rd_out2_aram));
  ramdag_aram_padded #(.W(W)) u_rd_pad  (.clk, .rst, .we1(rd_we1), .a1(rd_a1), .d1(rd_d1),
                                         .we2(rd_we2), .a2(rd_a2), .d2(rd_d2), .out1(rd_out1_pad),  .out2(rd_out2_pad));
  ramdag_sram        #(.W(W)) u_rd_sram (.clk, .rst, .we1(rd_we1), .a1(rd_a1), .d1(rd_d1),
                                         .we2(rd_we2), .a2(rd_a2), .d2(rd_d2), .out1(rd_out1_sram), .out2(rd_out2_sram));

  cyc_arom #(.W(W)) u_cyc_arom (.clk, .rst, .in(cyc_in), .out(cyc_out_arom));
  cyc_srom #(.W(W)) u_cyc_srom (.clk, .rst, .in(cyc_in), .out(cyc_out_srom));

  cyc2_arom        #(.W(W)) u_cyc2_arom (.clk, .rst, .in(cyc2_in), .out(cyc2_out_arom));
  cyc2_arom_padded #(.W(W)) u_cyc2_pad  (.clk, .rst, .in(cyc2_in), .out(cyc2_out_pad));
  cyc2_srom        #(.W(W)) u_cyc2_srom (.clk, .rst, .in(cyc2_in), .out(cyc2_out_srom));

  drg_arom #(.W(W)) u_drg_arom (.clk, .rst, .in(drg_in), .out(drg_out_arom));
  drg_srom #(.W(W)) u_drg_srom (.clk, .rst, .in(drg_in), .out(drg_out_srom));

  layered_srom #(.W(W), .LAYER_REGS(1'b0)) u_lay_flat (.clk, .rst, .in1(lay_in1), .in2(lay_in2), .in3(lay_in3),
                                                       .out1(lay_out1_flat), .out2(lay_out2_flat), .out3(lay_out3_flat));
  layered_srom #(.W(W), .LAYER_REGS(1'b1)) u_lay_cut  (.clk, .rst, .in1(lay_in1), .in2(lay_in2), .in3(lay_in3),
                                                       .out1(lay_out1_cut),  .out2(lay_out2_cut),  .out3(lay_out3_cut));

  equiv_rom3  #(.W(W)) u_eq_rom  (.clk, .rst, .d(eq_d), .q_srom(eq_rom_srom), .q_r_a(eq_rom_r_a), .q_a_r(eq_rom_a_r));
  equiv_rom3r #(.W(W)) u_eq_rom2 (.clk, .rst, .d(eq_d), .q_s_r(eq_rom2_s_r), .q_r_s(eq_rom2_r_s), .q_r_a_r(eq_rom2_r_a_r));
  equiv_ram3  #(.W(W)) u_eq_ram  (.clk, .rst, .we(eq_we), .a(eq_a), .dat(eq_dat),
                                  .q_sram(eq_ram_sram), .q_r_a(eq_ram_r_a), .q_a_r(eq_ram_a_r));
endmodule
