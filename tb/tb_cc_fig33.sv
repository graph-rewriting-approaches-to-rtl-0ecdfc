// tb_cc_fig33 - exhaustive check of the gate-level CC example against its
// truth table: F = 1 for ABC = 100, 101, 011, 111; G = 0 only for B = C = 1.
module tb_cc_fig33;
  logic a, b, c, f, g;
  cc_fig33 u_cc (.a, .b, .c, .f, .g);

  int checks = 0, failures = 0;
  // index {a,b,c}
  localparam logic [7:0] F_TT = 8'b1011_1000;   // bit i = F for {a,b,c} = i
  localparam logic [7:0] G_TT = 8'b0111_0111;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks += 2;
      if (f !== F_TT[i]) begin failures++; $display("FAIL F for abc=%03b: %b", i[2:0], f); end
      if (g !== G_TT[i]) begin failures++; $display("FAIL G for abc=%03b: %b", i[2:0], g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
