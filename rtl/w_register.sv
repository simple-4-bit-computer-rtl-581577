// w_register: the accumulator w of the 4-bit processor.
//
// A bank of D flip-flops loaded from the adder on every rising edge of the
// manual clock (push button PB1), so each press executes one instruction.
// rst_n is an active-low asynchronous clear, the quad flip-flop chip's
// master reset; the board keeps it inactive and clears w with the CLRW
// instruction instead. The clock edge and the reset are this design's
// choices: the circuit description only says the register is clocked by a
// manual push button.
module w_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
