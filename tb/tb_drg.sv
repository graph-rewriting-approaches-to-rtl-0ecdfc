// tb_drg - self-checking test of the counter (counter_inc) and of the loop
// example it feeds: drg_arom and the rewritten drg_srom.
//
// The counter must show 0, 1, 2, ... after reset and wrap at 2^W.  Model of
// the loop: out(0) = 0 and
// out(t+1) = A[in(t)] + B[in(t-1)] + t + C[out(t)]  (mod 2^W),
// with B[in(-1)] read as 0.  Both circuits must match it on every cycle; the
// run is long enough for the counter to wrap twice.
module tb_drg;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 700;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] in, oa, os, cnt;
  counter_inc #(.W(W)) u_cnt (.clk, .rst, .cnt);
  drg_arom    #(.W(W)) u_a (.clk, .rst, .in, .out(oa));
  drg_srom    #(.W(W)) u_s (.clk, .rst, .in, .out(os));

  int checks = 0, failures = 0, wraps = 0;
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

  logic [W-1:0] e, in_prev, mb;
  initial begin
    in = '0; e = '0; in_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      in = W'($urandom);
      #1;
      check("counter", cnt, W'(t));
      if (t > 0 && cnt == '0) wraps++;
      check("original", oa, e);
      check("rewrite", os, e);
      mb = (t == 0) ? '0 : W'(rom_word(7, 32'(in_prev)));
      e = W'(rom_word(6, 32'(in))) + mb + W'(t) + W'(rom_word(8, 32'(e)));
      in_prev = in;
      @(negedge clk);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
