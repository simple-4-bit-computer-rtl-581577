// carry_in_logic: carry into the adder of the 4-bit accumulator processor.
//
// A NAND of X2 and X1 followed by an inverter, so the carry in is 1 exactly
// when X2 = X1 = 1: for INCW (adds one to w) and SUBLW (completes the two's
// complement of L). For every other instruction it is 0. This gate network
// is the processor circuit's own. Purely combinational.
module carry_in_logic (
  input  logic x2,
  input  logic x1,
  output logic cin
);

  logic nand_out;

  assign nand_out = ~(x2 & x1);
  assign cin      = ~nand_out;

endmodule
