// cpu4_top: a 4-bit accumulator processor built from a multiplexer, an
// adder and a register.
//
// Every instruction is computed as  w <- A + B + cin  in one clock:
//   A   = operand_mux, chosen by X1,X0: w>>1, L, 0 or ~L
//   B   = feedback_gate: w when X2 = 1, else 0
//   cin = carry_in_logic: X2 AND X1
// which gives the six instructions of the control table:
//   X2 X1 X0  A     B  cin  result
//   0  1  0   0     0  0    CLRW   w <- 0
//   0  0  1   L     0  0    MOVL   w <- L
//   1  1  0   0     w  1    INCW   w <- w + 1
//   0  0  0   w>>1  0  0    ASHRW  w <- w >> 1
//   1  1  1   ~L    w  1    SUBLW  w <- w - L
//   1  0  1   L     w  0    ADDLW  w <- w + L
// The two remaining codes are not instructions, but the datapath still
// defines them: 011 gives w <- ~L and 100 gives w <- w + (w>>1).
//
// Interface: s is the literal L (switches S3..S0), x the instruction word
// (switches S7,S6,S5 = X2,X1,X0) and pb1_clk the manual clock: the
// instruction on x is executed at each rising edge. led drives the eight
// LEDs: L7..L4 show S3..S0 and L3..L0 show w3..w0. rst_n clears w
// asynchronously; it is this design's addition for simulation, since the
// board starts every program with CLRW. Data is two's complement and
// results wrap modulo 16. SIGN_FILL = 0 shifts a zero into w3 on ASHRW as
// the circuit does; SIGN_FILL = 1 makes it a true arithmetic shift.
module cpu4_top
  import cpu4_pkg::*;
#(
  parameter int unsigned WIDTH     = 4,
  parameter bit          SIGN_FILL = 1'b0
) (
  input  logic               pb1_clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   s,
  input  logic [2:0]         x,
  output logic [WIDTH-1:0]   w,
  output logic [2*WIDTH-1:0] led
);

  logic [WIDTH-1:0] a_op;
  logic [WIDTH-1:0] b_op;
  logic [WIDTH-1:0] sum;
  logic             cin;

  operand_mux #(.WIDTH(WIDTH), .SIGN_FILL(SIGN_FILL)) u_operand_mux (
    .sel (operand_sel_e'(x[1:0])),
    .lit (s),
    .w   (w),
    .a   (a_op)
  );

  feedback_gate #(.WIDTH(WIDTH)) u_feedback_gate (
    .en (x[2]),
    .w  (w),
    .b  (b_op)
  );

  carry_in_logic u_carry_in_logic (
    .x2  (x[2]),
    .x1  (x[1]),
    .cin (cin)
  );

  adder4 #(.WIDTH(WIDTH)) u_adder4 (
    .a   (a_op),
    .b   (b_op),
    .cin (cin),
    .sum (sum)
  );

  w_register #(.WIDTH(WIDTH)) u_w_register (
    .clk   (pb1_clk),
    .rst_n (rst_n),
    .d     (sum),
    .q     (w)
  );

  assign led = {s, w};

endmodule
