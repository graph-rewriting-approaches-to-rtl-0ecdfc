// tb_layered - self-checking test of layered_srom without (LAYER_REGS = 0)
// and with (LAYER_REGS = 1) the two layers of added pipeline registers.
//
// The expected outputs of the circuit without added registers are computed
// from the input history (Sk[x] is SROM k's word; anything before reset
// reads as 0):
//   s_k(t)   = Sk[in_k(t-1)]
//   out1(t)  = S4[Arom(s1(t-2), Bl(s2(t-1), s3(t-1)))]
//   out2(t)  = S5[C(Amid(s1(t-2), Bl(s2(t-1), s3(t-1))), Bm(s2(t-2), s3(t-2)))]
//   out3(t)  = S6[D(Br(s2(t-1), s3(t-1)))]
// The layered version must give the same values exactly two clocks later.
module tb_layered;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] in1, in2, in3;
  logic [W-1:0] f1, f2, f3, c1, c2, c3;
  layered_srom #(.W(W), .LAYER_REGS(1'b0)) u_f (.clk, .rst, .in1, .in2, .in3, .out1(f1), .out2(f2), .out3(f3));
  layered_srom #(.W(W), .LAYER_REGS(1'b1)) u_c (.clk, .rst, .in1, .in2, .in3, .out1(c1), .out2(c2), .out3(c3));

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

  logic [W-1:0] h1 [N], h2 [N], h3 [N];
  logic [W-1:0] e1 [N], e2 [N], e3 [N];
  function automatic logic [W-1:0] s(input int k, input int t);
    if (t < 1) return '0;
    case (k)
      1: return W'(rom_word(10, 32'(h1[t-1])));
      2: return W'(rom_word(11, 32'(h2[t-1])));
      default: return W'(rom_word(12, 32'(h3[t-1])));
    endcase
  endfunction
  function automatic logic [W-1:0] rom_or0(input int seed, input int t, input logic [W-1:0] a);
    return (t < 0) ? '0 : W'(rom_word(seed, 32'(a)));
  endfunction

  logic [W-1:0] bl, bm, br, ar, am, cc;
  initial begin
    in1 = '0; in2 = '0; in3 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      h1[t] = W'($urandom); h2[t] = W'($urandom); h3[t] = W'($urandom);
      in1 = h1[t]; in2 = h2[t]; in3 = h3[t];
      bl = W'(lay_b_left (32'(s(2, t-1)), 32'(s(3, t-1))));
      br = W'(lay_b_right(32'(s(2, t-1)), 32'(s(3, t-1))));
      bm = W'(lay_b_mid  (32'(s(2, t-2)), 32'(s(3, t-2))));
      ar = W'(lay_a_rom(32'(s(1, t-2)), 32'(bl)));
      am = W'(lay_a_mid(32'(s(1, t-2)), 32'(bl)));
      cc = W'(lay_c(32'(am), 32'(bm)));
      e1[t] = (t < 1) ? '0 : W'(rom_word(13, 32'(ar)));
      e2[t] = (t < 1) ? '0 : W'(rom_word(14, 32'(cc)));
      e3[t] = (t < 1) ? '0 : W'(rom_word(15, 32'(W'(lay_d(32'(br))))));
      #1;
      check("flat out1", f1, e1[t]);
      check("flat out2", f2, e2[t]);
      check("flat out3", f3, e3[t]);
      check("layered out1", c1, (t >= 2) ? e1[t-2] : '0);
      check("layered out2", c2, (t >= 2) ? e2[t-2] : '0);
      check("layered out3", c3, (t >= 2) ? e3[t-2] : '0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
