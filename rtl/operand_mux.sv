// operand_mux: first adder operand of the 4-bit accumulator processor.
//
// One 4-to-1 multiplexer per bit, all sharing the select lines {X1, X0}:
//   00  register w shifted right by one (bit i takes w[i+1])
//   01  literal L
//   10  constant zero
//   11  complement of L (the inverters for subtraction sit here)
// The sources and their order follow the processor's circuit description.
// For the shift, the incoming top bit is grounded in that circuit, which
// makes the shift logical; the instruction table calls the operation an
// arithmetic shift. SIGN_FILL selects between the two: 0 (default) grounds
// the top bit as the circuit does, 1 copies w's sign bit so the shift is
// arithmetic for negative values too. Purely combinational.
module operand_mux
  import cpu4_pkg::*;
#(
  parameter int unsigned WIDTH     = 4,
  parameter bit          SIGN_FILL = 1'b0
) (
  input  operand_sel_e       sel,  // {X1, X0}
  input  logic [WIDTH-1:0]   lit,  // literal L (switches S)
  input  logic [WIDTH-1:0]   w,    // register w
  output logic [WIDTH-1:0]   a     // to the adder's A input
);

  logic [WIDTH-1:0] shifted;
  logic [WIDTH-1:0] lit_n;

  assign shifted = {(SIGN_FILL ? w[WIDTH-1] : 1'b0), w[WIDTH-1:1]};
  assign lit_n   = ~lit;

  always_comb begin
    unique case (sel)
      SEL_SHIFT: a = shifted;
      SEL_LIT:   a = lit;
      SEL_ZERO:  a = '0;
      SEL_NLIT:  a = lit_n;
      default:   a = '0;
    endcase
  end

endmodule
