// tb_dag - self-checking test of the acyclic two-ROM example: dag_arom,
// dag_arom_padded and the rewritten dag_srom.
//
// Random inputs are applied each cycle.  The expected outputs are computed
// from the input history with the closed forms of the original circuit
// (Mk[x] is ROM k's word, reading an input from before reset gives 0):
//   out1(t) = Lout(M1[in1(t-2)], Tl(M2[in2(t-1)]))
//   out2(t) = B(Td(M2[in2(t-1)]), Lr(M1[in1(t-1)], Tl(M2[in2(t)])))
// The padded circuit gives out2 one clock later; the rewrite must equal the
// padded circuit on every cycle.
module tb_dag;
  import a2s_pkg::*;
  localparam int unsigned W = 8;
  localparam int N = 3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [W-1:0] in1, in2;
  logic [W-1:0] o1a, o2a, o1p, o2p, o1s, o2s;

  dag_arom        #(.W(W)) u_a (.clk, .rst, .in1, .in2, .out1(o1a), .out2(o2a));
  dag_arom_padded #(.W(W)) u_p (.clk, .rst, .in1, .in2, .out1(o1p), .out2(o2p));
  dag_srom        #(.W(W)) u_s (.clk, .rst, .in1, .in2, .out1(o1s), .out2(o2s));

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

  logic [W-1:0] h1 [N], h2 [N];
  function automatic logic [W-1:0] mm1(input int k); return (k < 0) ? '0 : W'(rom_word(2, 32'(h1[k]))); endfunction
  function automatic logic [W-1:0] mm2(input int k); return (k < 0) ? '0 : W'(rom_word(3, 32'(h2[k]))); endfunction
  function automatic logic [W-1:0] e_out1(input int t);
    return W'(dag_l_out(32'(mm1(t-2)), dag_t_left(32'(mm2(t-1)))));
  endfunction
  function automatic logic [W-1:0] e_out2(input int t);
    logic [W-1:0] tl, lr, td;
    tl = W'(dag_t_left(32'(mm2(t))));
    td = W'(dag_t_down(32'(mm2(t-1))));
    lr = W'(dag_l_right(32'(mm1(t-1)), 32'(tl)));
    return W'(dag_b(32'(td), 32'(lr)));
  endfunction

  initial begin
    in1 = '0; in2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < N; t++) begin
      h1[t] = W'($urandom); h2[t] = W'($urandom);
      in1 = h1[t]; in2 = h2[t];
      #1;
      check("orig out1", o1a, e_out1(t));
      check("orig out2", o2a, e_out2(t));
      check("padded out1", o1p, e_out1(t));
      if (t > 0) check("padded out2", o2p, e_out2(t-1));
      check("rewrite out1 == padded", o1s, o1p);
      check("rewrite out2 == padded", o2s, o2p);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
