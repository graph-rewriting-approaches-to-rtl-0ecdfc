// tb_equiv - self-checking test of the three memory equivalences the
// rewriting rules are built on: equiv_rom3 (SROM = R+AROM = AROM+R),
// equiv_rom3r (SROM+R = R+SROM = R+AROM+R) and equiv_ram3 (SRAM = R+ARAM =
// ARAM+R).
//
// Part 1 drives the RAM forms with addresses 1,2,3,1,2,3, data 11,12,13 and
// we 1,1,1,0,0,0 from the first cycle after reset and compares the outputs
// and the words at addresses 1-3 with the reference sequences.  Part 2 drives
// random addresses and data: the ROM forms must give M[d(t-1)] (one clock)
// and M[d(t-2)] (two clocks); the RAM forms must agree on every cycle, the
// SRAM and ARAM+R memories must match word for word, and the R+ARAM memory
// must match what they held one clock earlier.
module tb_equiv;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned SEED = 9;
  localparam int N = 2000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         we;
  logic [W-1:0] d, a, dat;
  logic [W-1:0] r_s, r_ra, r_ar, rr_sr, rr_rs, rr_rar, m_s, m_ra, m_ar;

  equiv_rom3  #(.W(W), .SEED(SEED)) u_rom3  (.clk, .rst, .d, .q_srom(r_s), .q_r_a(r_ra), .q_a_r(r_ar));
  equiv_rom3r #(.W(W), .SEED(SEED)) u_rom3r (.clk, .rst, .d, .q_s_r(rr_sr), .q_r_s(rr_rs), .q_r_a_r(rr_rar));
  equiv_ram3  #(.W(W))              u_ram3  (.clk, .rst, .we, .a, .dat, .q_sram(m_s), .q_r_a(m_ra), .q_a_r(m_ar));

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

  // reference pattern
  localparam int P = 6;
  localparam logic [W-1:0] PA  [P] = '{1, 2, 3, 1, 2, 3};
  localparam logic [W-1:0] PD  [P] = '{11, 12, 13, 0, 0, 0};
  localparam logic         PWE [P] = '{1, 1, 1, 0, 0, 0};
  localparam logic [W-1:0] E_Q [P] = '{0, 0, 0, 0, 11, 12};
  // words at addresses 1..3: SRAM and ARAM+R, then R+ARAM
  localparam logic [W-1:0] E_M_SAME [3][P] = '{'{0, 11, 11, 11, 11, 11}, '{0, 0, 12, 12, 12, 12}, '{0, 0, 0, 13, 13, 13}};
  localparam logic [W-1:0] E_M_LATE [3][P] = '{'{0, 0, 11, 11, 11, 11}, '{0, 0, 0, 12, 12, 12}, '{0, 0, 0, 0, 13, 13}};

  function automatic logic [W-1:0] rom(input logic [W-1:0] x);
    return W'(rom_word(SEED, 32'(x)));
  endfunction

  logic [W-1:0] d1, d2, sram_prev [2**W];
  int bad_same, bad_late;

  initial begin
    we = 1'b0; a = '0; dat = '0; d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // ---- Part 1: reference pattern
    for (int t = 0; t < P; t++) begin
      we = PWE[t]; a = PA[t]; dat = PD[t];
      #1;
      check("pattern SRAM", m_s, E_Q[t]);
      check("pattern R+ARAM", m_ra, E_Q[t]);
      check("pattern ARAM+R", m_ar, E_Q[t]);
      for (int k = 0; k < 3; k++) begin
        check("pattern SRAM word", u_ram3.u_sram.mem[k+1], E_M_SAME[k][t]);
        check("pattern ARAM+R word", u_ram3.u_ram3.mem[k+1], E_M_SAME[k][t]);
        check("pattern R+ARAM word", u_ram3.u_ram2.mem[k+1], E_M_LATE[k][t]);
      end
      @(negedge clk);
    end
    // ---- Part 2: random traffic, fresh reset
    we = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    d1 = '0; d2 = '0;
    for (int i = 0; i < 2**W; i++) sram_prev[i] = u_ram3.u_sram.mem[i];
    for (int t = 0; t < N; t++) begin
      d = W'($urandom);
      we = 1'($urandom); a = W'($urandom_range(0, 15)); dat = W'($urandom);
      #1;
      check("SROM", r_s, (t >= 1) ? rom(d1) : '0);
      check("R+AROM", r_ra, (t >= 1) ? rom(d1) : rom('0));
      check("AROM+R", r_ar, (t >= 1) ? rom(d1) : '0);
      check("SROM+R", rr_sr, (t >= 2) ? rom(d2) : '0);
      check("R+SROM", rr_rs, (t >= 2) ? rom(d2) : '0);
      check("R+AROM+R", rr_rar, (t >= 2) ? rom(d2) : '0);
      check("R+ARAM = SRAM", m_ra, m_s);
      check("ARAM+R = SRAM", m_ar, m_s);
      bad_same = 0; bad_late = 0;
      for (int i = 0; i < 2**W; i++) begin
        if (u_ram3.u_ram3.mem[i] !== u_ram3.u_sram.mem[i]) bad_same++;
        if (u_ram3.u_ram2.mem[i] !== sram_prev[i]) bad_late++;
        sram_prev[i] = u_ram3.u_sram.mem[i];
      end
      checks += 2;
      if (bad_same != 0) begin failures++; $display("FAIL ARAM+R memory differs from SRAM in %0d words at %0t", bad_same, $time); end
      if (bad_late != 0) begin failures++; $display("FAIL R+ARAM memory not one clock behind in %0d words at %0t", bad_late, $time); end
      d2 = d1; d1 = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
