// equiv_ram3 - the three interchangeable RAM forms behind the RAM rewriting
// rules: SRAM (write-after-read), registers on we/A/D followed by an ARAM,
// and an ARAM followed by a register.
//
// All three see the same we, a and dat.  Their outputs are equal on every
// cycle; with addresses 1,2,3,1,2,3, data 11,12,13 and we 1,1,1,0,0,0 each
// gives <0,0,0,0,11,12>.  Stored words: the SRAM and the ARAM-then-register
// form write at the same edges, so their memories match at every clock; the
// register-then-ARAM form writes one clock later, so its memory shows what the
// other two held one clock before (M[1] = <0,11,11,...> against
// <0,0,11,...>).  Structure as in the source; one width W for address and
// data is this design's choice.
module equiv_ram3 #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] a,
  input  logic [W-1:0] dat,
  output logic [W-1:0] q_sram,
  output logic [W-1:0] q_r_a,
  output logic [W-1:0] q_a_r
);
  logic         we_r;
  logic [W-1:0] a_r, dat_r, m3;

  sram  #(.W(W)) u_sram (.clk, .rst, .we, .a, .dat, .q(q_sram));

  reg_r #(.W(1)) u_rwe  (.clk, .rst, .d(we),  .q(we_r));
  reg_r #(.W(W)) u_ra   (.clk, .rst, .d(a),   .q(a_r));
  reg_r #(.W(W)) u_rd   (.clk, .rst, .d(dat), .q(dat_r));
  aram  #(.W(W)) u_ram2 (.clk, .rst, .we(we_r), .a(a_r), .dat(dat_r), .q(q_r_a));

  aram  #(.W(W)) u_ram3 (.clk, .rst, .we, .a, .dat, .q(m3));
  reg_r #(.W(W)) u_r3   (.clk, .rst, .d(m3), .q(q_a_r));
endmodule
