// adder4: binary adder with carry in for the 4-bit accumulator processor.
//
// sum = a + b + cin, modulo 2**WIDTH, as a two's-complement adder would give
// it. The circuit uses a 4-bit adder chip whose carry out is not used, so
// no carry out is produced here; overflow simply wraps. Written as
// behavioural addition rather than a gate-level carry chain.
// Purely combinational.
module adder4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b + WIDTH'(cin);

endmodule
