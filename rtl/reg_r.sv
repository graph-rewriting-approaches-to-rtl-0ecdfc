// reg_r - the register element R of the circuit model.
//
// A W-bit D flip-flop bank.  While rst is 1 at a rising clock edge the stored
// word becomes 0; otherwise it takes d.  q always shows the stored word, so for
// inputs d0, d1, d2, ... applied after reset the output sequence is
// <0, d0, d1, d2, ...>.  Reset is sampled on the clock edge (synchronous), a
// choice of this design: the element is only specified as "initialised to 0
// while reset is 1".
module reg_r #(
  parameter int unsigned W = a2s_pkg::DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
