// tb_a2s_top - end-to-end test of a2s_top with every parameter at its
// default (8-bit words, 256-word memories).
//
// All examples run at once from one reset with random inputs for N cycles.
// Per cycle it checks:
//   * cc:   F and G against their truth tables;
//   * xs:   a new start value is loaded every XS_PERIOD cycles; the AROM and
//           the rewritten SROM circuit show X_k k clocks after the load, the
//           two-cycle SROM circuit shows it 2k clocks after the load;
//   * dag, rd, cyc2: the padded original equals the original delayed where
//           registers were added, and the rewrite equals the padded original;
//   * cyc:  the rewrite equals the original;
//   * drg:  both versions equal out(t+1) = A[in(t)] + B[in(t-1)] + t + C[out(t)];
//   * lay:  the version with pipeline layers equals the flat one two clocks later;
//   * eq:   the one-clock ROM forms give M[d(t-1)], the two-clock forms
//           M[d(t-2)], and the three RAM forms agree.
// Each mechanism the examples exercise is counted - start-value loads,
// writes into the RAM addressed by logic, reads of a word written on the
// clock before, counter wrap-around, every CC input combination, non-zero
// outputs of every example - and a mechanism that never occurred counts as
// a failure.
module tb_a2s_top;
  import a2s_pkg::*;
  localparam int unsigned W = DEFAULT_W;
  localparam int N = 1500;
  localparam int XS_PERIOD = 24;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         cc_a, cc_b, cc_c, cc_f, cc_g;
  logic         xs_load;
  logic [W-1:0] xs_x0, xs_xn_arom, xs_xn_naive, xs_xn_conv;
  logic [W-1:0] dag_in1, dag_in2;
  logic [W-1:0] dag_out1_arom, dag_out2_arom, dag_out1_pad, dag_out2_pad, dag_out1_srom, dag_out2_srom;
  logic         rd_we1, rd_we2;
  logic [W-1:0] rd_a1, rd_d1, rd_a2, rd_d2;
  logic [W-1:0] rd_out1_aram, rd_out2_aram, rd_out1_pad, rd_out2_pad, rd_out1_sram, rd_out2_sram;
  logic [W-1:0] cyc_in, cyc_out_arom, cyc_out_srom;
  logic [W-1:0] cyc2_in, cyc2_out_arom, cyc2_out_pad, cyc2_out_srom;
  logic [W-1:0] drg_in, drg_out_arom, drg_out_srom;
  logic [W-1:0] lay_in1, lay_in2, lay_in3;
  logic [W-1:0] lay_out1_flat, lay_out2_flat, lay_out3_flat, lay_out1_cut, lay_out2_cut, lay_out3_cut;
  logic [W-1:0] eq_d, eq_rom_srom, eq_rom_r_a, eq_rom_a_r, eq_rom2_s_r, eq_rom2_r_s, eq_rom2_r_a_r;
  logic         eq_we;
  logic [W-1:0] eq_a, eq_dat, eq_ram_sram, eq_ram_r_a, eq_ram_a_r;

  a2s_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] F_TT = 8'b1011_1000;   // indexed by {a,b,c}
  localparam logic [7:0] G_TT = 8'b0111_0111;

  // mechanism counters
  int n_xs_load = 0, n_cc_combo = 0, n_rd_we3 = 0, n_rd_raw = 0, n_wrap = 0;
  int n_eq_rewrite = 0;
  int n_nz_dag = 0, n_nz_rd = 0, n_nz_cyc = 0, n_nz_cyc2 = 0, n_nz_drg = 0, n_nz_lay = 0;
  logic [7:0] cc_seen = '0;

  // histories
  logic [W-1:0] h_dag2 [N], h_rd1 [N], h_cyc2 [N];
  logic [W-1:0] h_l1 [N], h_l2 [N], h_l3 [N];
  logic [W-1:0] xs [2*XS_PERIOD];
  logic [W-1:0] drg_e, drg_in_prev, mb;
  logic [W-1:0] eq_d1, eq_d2, eq_last_a;
  logic         eq_last_we;
  logic         last_we1;
  logic [W-1:0] last_a1;
  int since_load;

  task automatic reduce_mech(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else
      $display("%-40s %0d", what, n);
  endtask

  initial begin
    {cc_a, cc_b, cc_c} = '0;
    xs_load = 1'b0; xs_x0 = '0;
    {dag_in1, dag_in2} = '0;
    {rd_we1, rd_we2} = '0; {rd_a1, rd_d1, rd_a2, rd_d2} = '0;
    cyc_in = '0; cyc2_in = '0; drg_in = '0;
    {lay_in1, lay_in2, lay_in3} = '0;
    eq_d = '0; eq_we = 1'b0; eq_a = '0; eq_dat = '0; eq_d1 = '0; eq_d2 = '0;
    eq_last_we = 1'b0; eq_last_a = '0;
    drg_e = '0; drg_in_prev = '0; last_we1 = 1'b0; last_a1 = '0;
    since_load = XS_PERIOD;            // no load seen yet
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      // ---- inputs for time t
      {cc_a, cc_b, cc_c} = 3'($urandom);
      xs_load = (t % XS_PERIOD == 3);
      xs_x0 = W'($urandom);
      dag_in1 = W'($urandom); dag_in2 = W'($urandom);
      rd_we1 = 1'($urandom); rd_we2 = 1'($urandom);
      rd_a1 = W'($urandom_range(0, 7)); rd_a2 = W'($urandom_range(0, 7));
      rd_d1 = W'($urandom); rd_d2 = W'($urandom);
      cyc_in = W'($urandom); cyc2_in = W'($urandom); drg_in = W'($urandom);
      lay_in1 = W'($urandom); lay_in2 = W'($urandom); lay_in3 = W'($urandom);
      eq_d = W'($urandom); eq_we = 1'($urandom); eq_a = W'($urandom_range(0, 7)); eq_dat = W'($urandom);
      if (xs_load) begin
        xs[0] = xs_x0;
        for (int k = 1; k < 2*XS_PERIOD; k++) xs[k] = xs[k-1] + W'(rom_word(1, 32'(xs[k-1])));
      end
      #1;
      // ---- gate network
      check("cc F", W'(cc_f), W'(F_TT[{cc_a, cc_b, cc_c}]));
      check("cc G", W'(cc_g), W'(G_TT[{cc_a, cc_b, cc_c}]));
      cc_seen[{cc_a, cc_b, cc_c}] = 1'b1;
      // ---- X_n sequence
      if (xs_load) begin
        n_xs_load++;
        since_load = 0;
      end else if (since_load < XS_PERIOD) begin
        since_load++;
        check("xs AROM X_k", xs_xn_arom, xs[since_load]);
        check("xs rewritten X_k", xs_xn_conv, xs[since_load]);
        if (since_load % 2 == 0) check("xs two-cycle X_k", xs_xn_naive, xs[since_load/2]);
      end
      check("xs rewritten == AROM", xs_xn_conv, xs_xn_arom);
      // ---- two-ROM acyclic example
      h_dag2[t] = dag_out2_arom;
      check("dag pad out1", dag_out1_pad, dag_out1_arom);
      check("dag pad out2", dag_out2_pad, (t >= 1) ? h_dag2[t-1] : '0);
      check("dag rewrite out1", dag_out1_srom, dag_out1_pad);
      check("dag rewrite out2", dag_out2_srom, dag_out2_pad);
      if (dag_out1_srom != '0 && dag_out2_srom != '0) n_nz_dag++;
      // ---- three-RAM acyclic example
      h_rd1[t] = rd_out1_aram;
      check("rd pad out1", rd_out1_pad, (t >= 2) ? h_rd1[t-2] : '0);
      check("rd pad out2", rd_out2_pad, rd_out2_aram);
      check("rd rewrite out1", rd_out1_sram, rd_out1_pad);
      check("rd rewrite out2", rd_out2_sram, rd_out2_pad);
      if (dut.u_rd_aram.we3) n_rd_we3++;
      if (last_we1 && last_a1 == rd_a1) n_rd_raw++;
      last_we1 = rd_we1; last_a1 = rd_a1;
      if (rd_out1_sram != '0 && rd_out2_sram != '0) n_nz_rd++;
      // ---- cycles
      check("cyc rewrite", cyc_out_srom, cyc_out_arom);
      if (cyc_out_srom != '0) n_nz_cyc++;
      h_cyc2[t] = cyc2_out_arom;
      check("cyc2 pad", cyc2_out_pad, (t >= 1) ? h_cyc2[t-1] : '0);
      check("cyc2 rewrite", cyc2_out_srom, cyc2_out_pad);
      if (cyc2_out_srom != '0) n_nz_cyc2++;
      // ---- loop with counter
      check("drg original", drg_out_arom, drg_e);
      check("drg rewrite", drg_out_srom, drg_e);
      if (t > 0 && dut.u_drg_arom.cnt == '0) n_wrap++;
      if (drg_out_srom != '0) n_nz_drg++;
      mb = (t == 0) ? '0 : W'(rom_word(7, 32'(drg_in_prev)));
      drg_e = W'(rom_word(6, 32'(drg_in))) + mb + W'(t) + W'(rom_word(8, 32'(drg_e)));
      drg_in_prev = drg_in;
      // ---- layered
      h_l1[t] = lay_out1_flat; h_l2[t] = lay_out2_flat; h_l3[t] = lay_out3_flat;
      check("lay out1", lay_out1_cut, (t >= 2) ? h_l1[t-2] : '0);
      check("lay out2", lay_out2_cut, (t >= 2) ? h_l2[t-2] : '0);
      check("lay out3", lay_out3_cut, (t >= 2) ? h_l3[t-2] : '0);
      if (lay_out1_cut != '0 && lay_out2_cut != '0 && lay_out3_cut != '0) n_nz_lay++;
      // ---- memory equivalences
      check("eq SROM", eq_rom_srom, (t >= 1) ? W'(rom_word(9, 32'(eq_d1))) : '0);
      check("eq R+AROM", eq_rom_r_a, eq_rom_srom);
      check("eq AROM+R", eq_rom_a_r, eq_rom_srom);
      check("eq SROM+R", eq_rom2_s_r, (t >= 2) ? W'(rom_word(9, 32'(eq_d2))) : '0);
      check("eq R+SROM", eq_rom2_r_s, eq_rom2_s_r);
      check("eq R+AROM+R", eq_rom2_r_a_r, eq_rom2_s_r);
      check("eq R+ARAM", eq_ram_r_a, eq_ram_sram);
      check("eq ARAM+R", eq_ram_a_r, eq_ram_sram);
      if (eq_last_we && eq_last_a == eq_a && eq_ram_sram != '0) n_eq_rewrite++;
      eq_last_we = eq_we; eq_last_a = eq_a;
      eq_d2 = eq_d1; eq_d1 = eq_d;
      @(negedge clk);
    end
    n_cc_combo = $countones(cc_seen);
    reduce_mech("start-value loads (xs)", n_xs_load);
    reduce_mech("CC input combinations seen (need 8)", (n_cc_combo == 8) ? 8 : 0);
    reduce_mech("writes into logic-addressed RAM (rd)", n_rd_we3);
    reduce_mech("reads of word written one clock before", n_rd_raw);
    reduce_mech("counter wrap-arounds (drg)", n_wrap);
    reduce_mech("non-zero cycles dag", n_nz_dag);
    reduce_mech("non-zero cycles rd", n_nz_rd);
    reduce_mech("non-zero cycles cyc", n_nz_cyc);
    reduce_mech("non-zero cycles cyc2", n_nz_cyc2);
    reduce_mech("non-zero cycles drg", n_nz_drg);
    reduce_mech("non-zero cycles lay", n_nz_lay);
    reduce_mech("eq RAM: address rewritten and read back", n_eq_rewrite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
