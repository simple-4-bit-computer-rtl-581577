// w_register_tb: self-check of the accumulator register.
//
// Checks the asynchronous clear, that the register takes d on a rising
// clock edge (exactly one edge per load), that it holds across the falling
// edge and while d changes between edges, over random data.
module w_register_tb;

  localparam int unsigned W = 4;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d, q;
  logic [W-1:0] expected;

  w_register #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("w_register_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d     = 4'b1010;
    rst_n = 1'b1;
    #10 clk = 1'b1;
    #10 clk = 1'b0;
    check(4'b1010, "load before reset");
    rst_n = 1'b0;
    #1 check(4'b0000, "asynchronous clear");
    d = 4'b0111;
    #10 clk = 1'b1;
    #10 clk = 1'b0;
    check(4'b0000, "clear holds while asserted");
    rst_n = 1'b1;
    expected = '0;
    for (int n = 0; n < 200; n++) begin
      d = W'($urandom);
      #5 check(expected, "hold while d changes");
      #5 clk = 1'b1;
      #1 expected = d;
      check(expected, "load on rising edge");
      d = ~d;
      #9 clk = 1'b0;
      #1 check(expected, "hold across falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
