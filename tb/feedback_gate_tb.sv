// feedback_gate_tb: exhaustive self-check of the register feedback gate.
//
// For both values of the select and every register value, the output must
// be zero when the select is 0 and equal to the register when it is 1.
module feedback_gate_tb;

  localparam int unsigned W = 4;

  int checks   = 0;
  int failures = 0;

  logic         en;
  logic [W-1:0] w, b;

  feedback_gate #(.WIDTH(W)) dut (.en(en), .w(w), .b(b));

  initial begin
    #1_000_000;
    failures++;
    $display("feedback_gate_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 16; r++) begin
        en = e[0];
        w  = r[W-1:0];
        #1;
        checks++;
        if (b !== (e == 1 ? r[W-1:0] : 4'b0000)) begin
          failures++;
          $display("FAIL en=%0d w=%b b=%b", e, w, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
