// carry_in_logic_tb: self-check of the adder carry-in logic.
//
// All four combinations of X2 and X1 are applied; the carry in must be 1
// only when both are 1 (the INCW and SUBLW codes).
module carry_in_logic_tb;

  int checks   = 0;
  int failures = 0;

  logic x2, x1, cin;

  carry_in_logic dut (.x2(x2), .x1(x1), .cin(cin));

  initial begin
    #1_000_000;
    failures++;
    $display("carry_in_logic_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x2, x1} = v[1:0];
      #1;
      checks++;
      if (cin !== (v == 3)) begin
        failures++;
        $display("FAIL x2=%b x1=%b cin=%b", x2, x1, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
