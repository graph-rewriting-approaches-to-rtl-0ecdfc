// tb_ramdag - self-checking test of the three-RAM example: ramdag_aram,
// ramdag_aram_padded and the rewritten ramdag_sram (write-after-read SRAMs).
//
// Random write enables, addresses (small range, so written words are read
// back often) and data drive both input RAMs.  A cycle-level model of the
// original circuit with its own three shadow memories runs in this
// testbench.  Checks per cycle: the original's outputs equal the model; the
// padded circuit's out1 is the model's out1 two clocks later; the rewrite's
// outputs equal the padded circuit's; the rewrite's first two RAMs hold the
// same words as the original's at every clock and its third RAM holds what
// the original's third RAM held one clock earlier.
module tb_ramdag;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         we1, we2;
  logic [W-1:0] a1, d1, a2, d2;
  logic [W-1:0] o1a, o2a, o1p, o2p, o1s, o2s;

  ramdag_aram        #(.W(W)) u_a (.clk, .rst, .we1, .a1, .d1, .we2, .a2, .d2, .out1(o1a), .out2(o2a));
  ramdag_aram_padded #(.W(W)) u_p (.clk, .rst, .we1, .a1, .d1, .we2, .a2, .d2, .out1(o1p), .out2(o2p));
  ramdag_sram        #(.W(W)) u_s (.clk, .rst, .we1, .a1, .d1, .we2, .a2, .d2, .out1(o1s), .out2(o2s));

  int checks = 0, failures = 0;
  int writes3 = 0, hits3 = 0;
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

  // model state
  logic [W-1:0] m1 [2**W], m2 [2**W], m3 [2**W], m3_prev [2**W];
  logic [W-1:0] r1, r2, r3;
  logic [W-1:0] out1_hist [N];
  logic [W-1:0] q1, q2, tl, td, a3, d3, lr, b;
  logic         we3;
  int bad1, bad3;

  initial begin
    for (int i = 0; i < 2**W; i++) begin m1[i] = '0; m2[i] = '0; m3[i] = '0; m3_prev[i] = '0; end
    r1 = '0; r2 = '0; r3 = '0;
    we1 = 0; we2 = 0; a1 = '0; a2 = '0; d1 = '0; d2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      we1 = 1'($urandom); we2 = 1'($urandom);
      a1 = W'($urandom_range(0, 15)); a2 = W'($urandom_range(0, 15));
      d1 = W'($urandom); d2 = W'($urandom);
      // model, time t
      q1 = m1[a1]; q2 = m2[a2];
      tl = W'(rd_t_left(32'(q2))); td = W'(rd_t_down(32'(q2)));
      we3 = rd_l_we(32'(r1), 32'(tl));
      a3 = W'(rd_l_addr(32'(r1), 32'(tl)));
      d3 = W'(rd_l_data(32'(r1), 32'(tl)));
      lr = W'(rd_l_right(32'(r1), 32'(tl)));
      b  = W'(rd_b(32'(r2), 32'(lr)));
      out1_hist[t] = m3[a3];
      #1;
      check("orig out1", o1a, m3[a3]);
      check("orig out2", o2a, r3);
      check("padded out1", o1p, (t >= 2) ? out1_hist[t-2] : '0);
      check("padded out2", o2p, r3);
      check("rewrite out1", o1s, o1p);
      check("rewrite out2", o2s, o2p);
      if (m3[a3] != '0) hits3++;
      // stored data
      bad1 = 0; bad3 = 0;
      for (int i = 0; i < 2**W; i++) begin
        if (u_s.u_ram1.mem[i] !== u_a.u_ram1.mem[i] || u_s.u_ram2.mem[i] !== u_a.u_ram2.mem[i]) bad1++;
        if (u_s.u_ram3.mem[i] !== m3_prev[i]) bad3++;
      end
      checks += 2;
      if (bad1 != 0) begin failures++; $display("FAIL RAM1/RAM2 contents differ in %0d words at %0t", bad1, $time); end
      if (bad3 != 0) begin failures++; $display("FAIL RAM3 contents not one clock behind in %0d words at %0t", bad3, $time); end
      // edge t+1
      for (int i = 0; i < 2**W; i++) m3_prev[i] = m3[i];
      if (we1) m1[a1] = d1;
      if (we2) m2[a2] = d2;
      if (we3) begin m3[a3] = d3; writes3++; end
      r1 = q1; r2 = td; r3 = b;
      @(negedge clk);
    end
    checks++;
    if (writes3 == 0 || hits3 == 0) begin
      failures++;
      $display("FAIL third RAM never written (%0d) or never read back non-zero (%0d)", writes3, hits3);
    end
    $display("third RAM: %0d writes, %0d non-zero reads", writes3, hits3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
