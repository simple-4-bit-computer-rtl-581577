// adder4_tb: exhaustive self-check of the 4-bit adder.
//
// Every pair of operands with both carry-in values is applied and the sum
// compared with integer addition taken modulo 16.
module adder4_tb;

  localparam int unsigned W = 4;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0] a, b, sum;
  logic         cin;

  adder4 #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum));

  initial begin
    #1_000_000;
    failures++;
    $display("adder4_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        for (int c = 0; c < 2; c++) begin
          a   = i[W-1:0];
          b   = j[W-1:0];
          cin = c[0];
          #1;
          checks++;
          if (int'(sum) != (i + j + c) % 16) begin
            failures++;
            $display("FAIL %0d + %0d + %0d = %0d", i, j, c, sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
