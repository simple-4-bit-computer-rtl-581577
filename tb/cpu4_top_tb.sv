// cpu4_top_tb: end-to-end test of the 4-bit accumulator processor at its
// default parameters.
//
// The manual clock is pulsed as on the board: inputs are set while the
// clock is low, the clock is raised for half a period and lowered again,
// 100 time units per instruction. Three parts:
//  1. The six-instruction program for (x+1)/2 - y + z with x=2, y=4, z=2
//     (CLRW, MOVL 2, INCW, ASHRW, SUBLW 4, ADDLW 2). w must step through
//     0000, 0010, 0011, 0001, 1101, 1111 and the LEDs must show {S, w}.
//  2. The same program for every x, y, z in 0..15, against the expression
//     evaluated in modulo-16 arithmetic.
//  3. Random instruction streams, the two unused codes included, against
//     the reference model, with a few asynchronous clears.
// Each instruction must take effect at the rising edge that executes it and
// not before. The test counts how often each instruction, a carry in, a
// two's-complement overflow wrap, a shift of a negative value, an unused
// code and the clear occurred, and fails for any that never did.
module cpu4_top_tb;
  import cpu4_pkg::*;
  import cpu4_ref_pkg::*;

  int checks   = 0;
  int failures = 0;

  logic       pb1_clk = 1'b0;
  logic       rst_n   = 1'b1;
  logic [3:0] s       = '0;
  logic [2:0] x       = '0;
  logic [3:0] w;
  logic [7:0] led;

  logic [3:0] model_w;

  int n_op[8];
  int n_carry_in, n_overflow, n_neg_shift, n_unused, n_clear;

  cpu4_top dut (.pb1_clk(pb1_clk), .rst_n(rst_n), .s(s), .x(x), .w(w), .led(led));

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Execute one instruction with one press of the manual clock.
  task automatic exec(input logic [2:0] op, input logic [3:0] lit);
    logic [3:0] exp_w;
    int         sum_signed;
    x = op;
    s = lit;
    #50;
    checks++;
    if (w !== model_w)
      fail($sformatf("w changed before the clock edge: w=%b expected %b", w, model_w));
    checks++;
    if (led !== {lit, model_w}) fail($sformatf("led=%b expected %b", led, {lit, model_w}));
    exp_w = ref_next(op, model_w, lit, 1'b0);
    n_op[op]++;
    if (op == INCW || op == SUBLW) n_carry_in++;
    if (op == 3'b011 || op == 3'b100) n_unused++;
    if (op == ASHRW && model_w[3]) n_neg_shift++;
    sum_signed = (op == ADDLW) ? signed4(model_w) + signed4(lit) :
                 (op == SUBLW) ? signed4(model_w) - signed4(lit) :
                 (op == INCW)  ? signed4(model_w) + 1 : 0;
    if (sum_signed > 7 || sum_signed < -8) n_overflow++;
    pb1_clk = 1'b1;
    #1;
    checks++;
    if (w !== exp_w)
      fail($sformatf("op=%b L=%b w_before=%b: w=%b expected %b", op, lit, model_w, w, exp_w));
    model_w = exp_w;
    #49;
    pb1_clk = 1'b0;
  endtask

  task automatic clear_async();
    #10 rst_n = 1'b0;
    #1;
    checks++;
    if (w !== 4'b0000) fail($sformatf("asynchronous clear: w=%b", w));
    model_w = '0;
    n_clear++;
    #10 rst_n = 1'b1;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("cpu4_top_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expect_trace[6];
    n_carry_in = 0; n_overflow = 0; n_neg_shift = 0; n_unused = 0; n_clear = 0;
    foreach (n_op[i]) n_op[i] = 0;

    // Start from a known w, then run the worked program.
    rst_n = 1'b0;
    #5 rst_n = 1'b1;
    model_w = '0;
    n_clear++;
    // Make w non-zero so that the first CLRW visibly clears it.
    exec(MOVL, 4'b0100);

    expect_trace = '{4'b0000, 4'b0010, 4'b0011, 4'b0001, 4'b1101, 4'b1111};
    exec(CLRW,  4'b1111); checks++; if (w !== expect_trace[0]) fail("program step CLRW");
    exec(MOVL,  4'b0010); checks++; if (w !== expect_trace[1]) fail("program step MOVL");
    exec(INCW,  4'b0010); checks++; if (w !== expect_trace[2]) fail("program step INCW");
    exec(ASHRW, 4'b0010); checks++; if (w !== expect_trace[3]) fail("program step ASHRW");
    exec(SUBLW, 4'b0100); checks++; if (w !== expect_trace[4]) fail("program step SUBLW");
    exec(ADDLW, 4'b0010); checks++; if (w !== expect_trace[5]) fail("program step ADDLW");
    checks++;
    if (signed4(w) != -1) fail($sformatf("program result %0d, expected -1", signed4(w)));
    $display("program (2+1)/2 - 4 + 2 = %0d (w=%b)", signed4(w), w);

    // The same program over all inputs.
    for (int xv = 0; xv < 16; xv++) begin
      for (int yv = 0; yv < 16; yv++) begin
        for (int zv = 0; zv < 16; zv++) begin
          int e;
          exec(CLRW, 4'($urandom));
          exec(MOVL, 4'(xv));
          exec(INCW, 4'($urandom));
          exec(ASHRW, 4'($urandom));
          exec(SUBLW, 4'(yv));
          exec(ADDLW, 4'(zv));
          e = ((((xv + 1) % 16) / 2) - yv + zv + 32) % 16;
          checks++;
          if (int'(w) != e) fail($sformatf("x=%0d y=%0d z=%0d: w=%b expected %0d", xv, yv, zv, w, e));
        end
      end
    end

    // Random instruction streams, all eight codes.
    for (int n = 0; n < 3000; n++) begin
      if (n % 500 == 250) clear_async();
      exec(3'($urandom), 4'($urandom));
    end

    foreach (n_op[i])
      $display("code %b executed %0d times", 3'(i), n_op[i]);
    $display("carry in %0d, overflow wraps %0d, shifts of negative w %0d, unused codes %0d, clears %0d",
             n_carry_in, n_overflow, n_neg_shift, n_unused, n_clear);
    foreach (n_op[i]) begin
      checks++;
      if (n_op[i] == 0) fail($sformatf("code %b never executed", 3'(i)));
    end
    checks += 5;
    if (n_carry_in  == 0) fail("carry in never used");
    if (n_overflow  == 0) fail("no overflow wrap");
    if (n_neg_shift == 0) fail("no shift of a negative value");
    if (n_unused    == 0) fail("no unused code");
    if (n_clear     == 0) fail("no asynchronous clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
