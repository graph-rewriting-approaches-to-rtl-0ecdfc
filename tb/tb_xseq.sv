// tb_xseq - self-checking test of the three X_n = X_{n-1} + f(X_{n-1})
// circuits: the AROM original, the straightforward two-register SROM version
// and the rewritten SROM version.
//
// The testbench loads a random X_0 (load high for one cycle), lets the loop
// run, and repeats.  It computes X_1, X_2, ... itself from the ROM table and
// checks that the AROM original and the rewritten circuit deliver X_k exactly
// k clocks after the load edge (one value per clock), that the
// straightforward SROM version delivers X_k 2k clocks after it (one value
// every two clocks), and that the original and the rewrite agree on every
// cycle, including those right after reset.
module tb_xseq;
  localparam int unsigned W = 8;
  localparam int unsigned SEED = 1;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic         load;
  logic [W-1:0] x0, xn_a, xn_n, xn_c;

  xseq_arom       #(.W(W), .SEED(SEED)) u_a (.clk, .rst, .load, .x0, .xn(xn_a));
  xseq_srom_naive #(.W(W), .SEED(SEED)) u_n (.clk, .rst, .load, .x0, .xn(xn_n));
  xseq_srom_conv  #(.W(W), .SEED(SEED)) u_c (.clk, .rst, .load, .x0, .xn(xn_c));

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic [W-1:0] nxt(input logic [W-1:0] x);
    return x + W'(a2s_pkg::rom_word(SEED, 32'(x)));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int RUN = 12;
  logic [W-1:0] xs [2*RUN+1];

  initial begin
    load = 1'b0; x0 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // free run from reset: original and rewrite must already agree
    for (int t = 0; t < 10; t++) begin
      #1 check("free run a==c", xn_c, xn_a);
      @(negedge clk);
    end
    for (int rep = 0; rep < 40; rep++) begin
      x0 = W'($urandom);
      xs[0] = x0;
      for (int k = 1; k <= 2*RUN; k++) xs[k] = nxt(xs[k-1]);
      load = 1'b1;
      #1 check("load cycle a==c", xn_c, xn_a);
      @(negedge clk);
      load = 1'b0;
      x0 = W'($urandom);             // ignored while load is low
      for (int k = 1; k <= 2*RUN; k++) begin
        #1;
        if (k <= RUN) begin
          check("AROM X_k after k clocks", xn_a, xs[k]);
          check("rewritten X_k after k clocks", xn_c, xs[k]);
        end
        if (k % 2 == 0) check("naive X_k after 2k clocks", xn_n, xs[k/2]);
        check("a==c", xn_c, xn_a);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
