// tb_prims - self-checking test of the memory and register primitives:
// reg_r, arom, srom, aram and sram in both read modes.
//
// Part 1 replays the reference write/read pattern: addresses 1,2,3,1,2,3,
// data 11,12,13 with write enable high for the first three cycles.  Expected
// outputs at times 0..5: ARAM 0,0,0,11,12,13; SRAM write-after-read
// 0,0,0,0,11,12; SRAM read-after-write 0,11,12,13,11,12; register 0,11,12,13.
// Part 2 drives random traffic and compares every output each cycle with a
// model kept in this testbench (register: previous input; ROMs: the rom_word
// table, one cycle later for the SROM; RAMs: a shadow array).
// Time t is the state just after rising edge t; edge 0 is the last edge
// with reset high.  Inputs for time t are applied after edge t.
module tb_prims;
  localparam int unsigned W = 8;
  localparam int unsigned SEED = 9;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] d, a, dat;
  logic         we;
  logic [W-1:0] q_r, q_arom, q_srom, q_aram, q_war, q_raw;

  reg_r #(.W(W))               u_r    (.clk, .rst, .d(d), .q(q_r));
  arom  #(.W(W), .SEED(SEED))  u_arom (.d(d), .q(q_arom));
  srom  #(.W(W), .SEED(SEED))  u_srom (.clk, .rst, .d(d), .q(q_srom));
  aram  #(.W(W))               u_aram (.clk, .rst, .we, .a, .dat, .q(q_aram));
  sram  #(.W(W), .RAW(1'b0))   u_war  (.clk, .rst, .we, .a, .dat, .q(q_war));
  sram  #(.W(W), .RAW(1'b1))   u_raw  (.clk, .rst, .we, .a, .dat, .q(q_raw));

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [W-1:0] m(input logic [W-1:0] x);
    return W'(a2s_pkg::rom_word(SEED, 32'(x)));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pattern
  localparam logic [W-1:0] PA   [6] = '{1, 2, 3, 1, 2, 3};
  localparam logic [W-1:0] PD   [6] = '{11, 12, 13, 0, 0, 0};
  localparam logic         PWE  [6] = '{1, 1, 1, 0, 0, 0};
  localparam logic [W-1:0] E_AR [6] = '{0, 0, 0, 11, 12, 13};
  localparam logic [W-1:0] E_WAR[6] = '{0, 0, 0, 0, 11, 12};
  localparam logic [W-1:0] E_RAW[6] = '{0, 11, 12, 13, 11, 12};
  localparam logic [W-1:0] E_R  [4] = '{0, 11, 12, 13};

  logic [W-1:0] shadow [2**W];
  logic [W-1:0] d_prev, a_prev, war_exp, raw_exp;

  initial begin
    d = '0; a = '0; dat = '0; we = 1'b0;
    repeat (3) @(posedge clk);          // edges with reset high; the last is edge 0
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 6; t++) begin
      // time t: registered outputs reflect edge t; apply inputs of time t
      a = PA[t]; dat = PD[t]; we = PWE[t]; d = PD[t];
      #1;
      check("ARAM pattern", q_aram, E_AR[t]);
      check("SRAM WAR pattern", q_war, E_WAR[t]);
      check("SRAM RAW pattern", q_raw, E_RAW[t]);
      if (t < 4) check("R pattern", q_r, E_R[t]);
      @(negedge clk);
    end

    // Part 2: random traffic against the models
    for (int i = 0; i < 2**W; i++) shadow[i] = u_aram.mem[i];
    we = 1'b0; #1;
    @(negedge clk);
    d_prev = d; a_prev = a;
    for (int t = 0; t < 2000; t++) begin
      d   = W'($urandom);
      a   = W'($urandom_range(0, 15));   // small range: frequent re-reads of written words
      dat = W'($urandom);
      we  = 1'($urandom);
      #1;
      check("AROM", q_arom, m(d));
      check("ARAM", q_aram, shadow[a]);
      @(posedge clk);
      war_exp = shadow[a];
      raw_exp = we ? dat : shadow[a];
      if (we) shadow[a] = dat;
      d_prev = d;
      @(negedge clk);
      check("R", q_r, d_prev);
      check("SROM", q_srom, m(d_prev));
      check("SRAM WAR", q_war, war_exp);
      check("SRAM RAW", q_raw, raw_exp);
    end

    // reset clears the registered outputs
    rst = 1'b1;
    @(negedge clk);
    check("R reset", q_r, '0);
    check("SROM reset", q_srom, '0);
    check("SRAM reset", q_war, '0);
    // writes are blocked while reset is asserted
    we = 1'b1; a = W'(5); dat = ~shadow[5];
    @(negedge clk);
    check("ARAM write blocked in reset", q_aram, shadow[5]);
    rst = 1'b0; we = 1'b0;
    @(negedge clk);
    check("SRAM write blocked in reset", q_war, shadow[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
