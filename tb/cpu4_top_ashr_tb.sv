// cpu4_top_ashr_tb: the processor built with SIGN_FILL = 1, so that ASHRW
// is a true arithmetic right shift. Random instruction streams are checked
// against the reference model; negative values must keep their sign when
// shifted (for example 1101 (-3) becomes 1110 (-2)).
module cpu4_top_ashr_tb;
  import cpu4_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int n_neg_shift = 0;

  logic       pb1_clk = 1'b0;
  logic       rst_n   = 1'b1;
  logic [3:0] s       = '0;
  logic [2:0] x       = '0;
  logic [3:0] w;
  logic [7:0] led;
  logic [3:0] model_w;

  cpu4_top #(.SIGN_FILL(1'b1)) dut (.pb1_clk(pb1_clk), .rst_n(rst_n), .s(s), .x(x), .w(w), .led(led));

  initial begin
    #10_000_000;
    failures++;
    $display("cpu4_top_ashr_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    #5 rst_n = 1'b1;
    model_w = '0;
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] e;
      x = 3'($urandom);
      s = 4'($urandom);
      #50;
      e = ref_next(x, model_w, s, 1'b1);
      if (x == 3'b000 && model_w[3]) n_neg_shift++;
      pb1_clk = 1'b1;
      #1;
      checks++;
      if (w !== e) begin
        failures++;
        $display("FAIL op=%b L=%b w_before=%b: w=%b expected %b", x, s, model_w, w, e);
      end
      model_w = e;
      checks++;
      if (led !== {s, w}) begin
        failures++;
        $display("FAIL led=%b expected %b", led, {s, w});
      end
      #49 pb1_clk = 1'b0;
    end
    checks++;
    if (n_neg_shift == 0) begin
      failures++;
      $display("FAIL no shift of a negative value");
    end
    $display("shifts of negative w: %0d", n_neg_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
