// operand_mux_tb: exhaustive self-check of the operand multiplexer.
//
// Two instances are checked, one with the top bit grounded on the shift
// (the default) and one with sign fill. For every select code, literal and
// register value the output is compared with a value built here bit by bit
// from the selection table. A watchdog ends the run if it stalls.
module operand_mux_tb;
  import cpu4_pkg::*;

  localparam int unsigned W = 4;

  int checks   = 0;
  int failures = 0;

  operand_sel_e   sel;
  logic [W-1:0]   lit, w;
  logic [W-1:0]   a_zero, a_sign;

  operand_mux #(.WIDTH(W), .SIGN_FILL(1'b0)) dut_zero (.sel(sel), .lit(lit), .w(w), .a(a_zero));
  operand_mux #(.WIDTH(W), .SIGN_FILL(1'b1)) dut_sign (.sel(sel), .lit(lit), .w(w), .a(a_sign));

  function automatic logic [W-1:0] expect_a(input logic [1:0] s, input logic [W-1:0] l,
                                            input logic [W-1:0] r, input bit fill);
    logic [W-1:0] e;
    for (int i = 0; i < W; i++) begin
      case (s)
        2'd0: e[i] = (i == W-1) ? (fill & r[W-1]) : r[i+1];
        2'd1: e[i] = l[i];
        2'd2: e[i] = 1'b0;
        default: e[i] = !l[i];
      endcase
    end
    return e;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("operand_mux_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int l = 0; l < 16; l++) begin
        for (int r = 0; r < 16; r++) begin
          sel = operand_sel_e'(s[1:0]);
          lit = l[W-1:0];
          w   = r[W-1:0];
          #1;
          checks += 2;
          if (a_zero !== expect_a(s[1:0], lit, w, 1'b0)) begin
            failures++;
            $display("FAIL zero-fill sel=%0d L=%b w=%b a=%b exp=%b", s, lit, w, a_zero,
                     expect_a(s[1:0], lit, w, 1'b0));
          end
          if (a_sign !== expect_a(s[1:0], lit, w, 1'b1)) begin
            failures++;
            $display("FAIL sign-fill sel=%0d L=%b w=%b a=%b exp=%b", s, lit, w, a_sign,
                     expect_a(s[1:0], lit, w, 1'b1));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
