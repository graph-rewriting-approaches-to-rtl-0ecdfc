// tb_cyc2 - self-checking test of the cycle example with the ROM inside the
// loop: cyc2_arom, cyc2_arom_padded and the rewritten cyc2_srom.
//
// Model: loop register r starts at 0; u(t) = Top(in(t), r(t)),
// out(t) = Out(M[u(t)]) combinationally, r(t+1) = Fb(M[u(t)]).  The padded
// circuit shows out one clock later (0 at time 0); the rewrite must equal the
// padded circuit on every cycle.
module tb_cyc2;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] in, oa, op, os;
  cyc2_arom        #(.W(W)) u_a (.clk, .rst, .in, .out(oa));
  cyc2_arom_padded #(.W(W)) u_p (.clk, .rst, .in, .out(op));
  cyc2_srom        #(.W(W)) u_s (.clk, .rst, .in, .out(os));

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

  logic [W-1:0] r, mw, e, e_prev;
  initial begin
    in = '0; r = '0; e_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      in = W'($urandom);
      mw = W'(rom_word(5, 32'(W'(cyc2_top(32'(in), 32'(r))))));
      e  = W'(cyc2_out(32'(mw)));
      #1;
      check("original", oa, e);
      check("padded", op, e_prev);
      check("rewrite", os, op);
      r = W'(cyc2_fb(32'(mw)));
      e_prev = e;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
