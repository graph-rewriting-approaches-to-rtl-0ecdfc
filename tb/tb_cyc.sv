// tb_cyc - self-checking test of the cycle example with the ROM before the
// loop: cyc_arom and the rewritten cyc_srom.
//
// Model: state x starts at 0, out(t) = Out(x(t)) and
// x(t+1) = Top(M[in(t)], Fb(x(t))).  Both circuits must match it on every
// cycle from reset on, with random inputs.
module tb_cyc;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] in, oa, os;
  cyc_arom #(.W(W)) u_a (.clk, .rst, .in, .out(oa));
  cyc_srom #(.W(W)) u_s (.clk, .rst, .in, .out(os));

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

  logic [W-1:0] x, e;
  initial begin
    in = '0; x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      in = W'($urandom);
      e = W'(cyc_out(32'(x)));
      #1;
      check("original", oa, e);
      check("rewrite", os, e);
      x = W'(cyc_top(rom_word(4, 32'(in)), cyc_fb(32'(x))));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
