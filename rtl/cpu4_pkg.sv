// cpu4_pkg: instruction codes and operand-select codes shared by the 4-bit
// accumulator processor and its testbenches.
//
// The instruction word is the three control switches X2,X1,X0. The codes
// below are the ones the processor's control table assigns to its six
// instructions. X1,X0 double as the select lines of the operand
// multiplexers, so the operand source of each instruction is fixed by its
// low two bits; X2 gates the register onto the adder's second input. The
// codes 3'b011 and 3'b100 are not instructions; the datapath still does
// something defined with them (see cpu4_top).
package cpu4_pkg;

  // Instruction word {X2, X1, X0}.
  typedef enum logic [2:0] {
    ASHRW = 3'b000,  // w <- w shifted right by one
    MOVL  = 3'b001,  // w <- L
    CLRW  = 3'b010,  // w <- 0
    ADDLW = 3'b101,  // w <- w + L
    INCW  = 3'b110,  // w <- w + 1
    SUBLW = 3'b111   // w <- w - L
  } opcode_e;

  // Operand multiplexer select {X1, X0}.
  typedef enum logic [1:0] {
    SEL_SHIFT = 2'b00,  // register shifted right by one
    SEL_LIT   = 2'b01,  // literal L
    SEL_ZERO  = 2'b10,  // constant zero
    SEL_NLIT  = 2'b11   // complement of L
  } operand_sel_e;

endpackage
