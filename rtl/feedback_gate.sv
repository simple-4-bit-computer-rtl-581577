// feedback_gate: second adder operand of the 4-bit accumulator processor.
//
// Four 2-to-1 multiplexers that share one select, X2: with X2 = 0 the adder
// sees zero (the instruction replaces w), with X2 = 1 it sees the register w
// (the instruction accumulates into w). Each bit is written as the two-level
// NAND form the circuit uses, NAND(NAND(X2, w_i), NAND(X2, w_i)), which is
// X2 AND w_i. Purely combinational.
module feedback_gate #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             en,  // X2
  input  logic [WIDTH-1:0] w,   // register w
  output logic [WIDTH-1:0] b    // to the adder's B input
);

  logic [WIDTH-1:0] nand1;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      nand1[i] = ~(en & w[i]);
      b[i]     = ~(nand1[i] & nand1[i]);
    end
  end

endmodule
