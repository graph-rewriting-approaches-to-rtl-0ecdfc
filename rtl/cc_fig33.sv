// cc_fig33 - the example combinational circuit CC with three inputs and two
// outputs: F = A & ~B | B & C and G = ~(B & C), written directly from the two
// formulas, with the shared product B & C computed once.  Pure combinational
// logic, no clock; outputs follow the inputs after gate delay only.  The
// module uses nothing from the shared package, so a lint run that reads the
// package ahead of this file reports the package's width constant as unused.
module cc_fig33 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f,
  output logic g
);
  logic a_nb, bc;
  assign a_nb = a & ~b;
  assign bc   = b & c;
  assign f    = a_nb | bc;
  assign g    = ~bc;
endmodule
