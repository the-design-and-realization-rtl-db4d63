// tb_divider_iterative: self-checking test of the one-bit-per-clock divider.
//
// Three instances:
//  * the default configuration (32-bit integer operands, 32.7 quotient), fed
//    random operands and compared with floor(dividend * 2^7 / divisor);
//  * the worked example 128 / 11 with a 4.7 quotient: the partial dividend is
//    checked after each of the 11 clocks against the hand-worked long division,
//    and the result must be 1011.1010001 after exactly 11 clocks;
//  * a fractional divisor (2.2 format), dividend 4.0, quotient 6.5, random.
// Every division also checks that done arrives Q_I+Q_F clocks after start.
module tb_divider_iterative;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---- default size
  logic        s0, b0, d0;
  logic [31:0] x0, y0;
  logic [38:0] q0;
  logic [38:0] r0;
  divider_iterative u0 (.clk, .rst_n, .start(s0), .dividend(x0), .divisor(y0),
                        .busy(b0), .done(d0), .quotient(q0), .remainder(r0));

  // ---- worked example, 8-bit dividend, 4-bit divisor, 4.7 quotient
  logic        s1, b1, d1;
  logic [7:0]  x1;
  logic [3:0]  y1;
  logic [10:0] q1;
  logic [14:0] r1;
  divider_iterative #(.DVD_I(8), .DVD_F(0), .DVS_I(4), .DVS_F(0), .Q_I(4), .Q_F(7)) u1 (
    .clk, .rst_n, .start(s1), .dividend(x1), .divisor(y1),
    .busy(b1), .done(d1), .quotient(q1), .remainder(r1));

  // ---- fractional divisor
  logic        s2, b2, d2;
  logic [3:0]  x2;
  logic [3:0]  y2;
  logic [10:0] q2;
  logic [10:0] r2;
  divider_iterative #(.DVD_I(4), .DVD_F(0), .DVS_I(2), .DVS_F(2), .Q_I(6), .Q_F(5)) u2 (
    .clk, .rst_n, .start(s2), .dividend(x2), .divisor(y2),
    .busy(b2), .done(d2), .quotient(q2), .remainder(r2));

  int cyc;

  // Advance one clock and step past the edge, so that register outputs read
  // afterwards are the values that edge produced.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    longint unsigned exp_q, num;
    static int unsigned trace [11] = '{5120, 5120, 2304, 896, 192, 192, 16, 16, 16, 16, 5};
    {s0, s1, s2} = '0; x0 = '0; y0 = '0; x1 = '0; y1 = '0; x2 = '0; y2 = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // Worked example 128/11.
    x1 = 8'd128; y1 = 4'd11; s1 = 1'b1;
    tick();
    s1 = 1'b0;
    for (int k = 0; k < 11; k++) begin
      chk(r1 == 15'(trace[k]), $sformatf("128/11 step %0d partial dividend %0d exp %0d", k + 1, r1, trace[k]));
      chk(d1 == (k == 10), $sformatf("128/11 done at step %0d = %0b", k + 1, d1));
      if (k < 10) tick();
    end
    chk(q1 == 11'b1011_1010001, $sformatf("128/11 quotient %b", q1));
    tick();

    // Default size, random.
    for (int i = 0; i < 200; i++) begin
      x0 = $urandom();
      y0 = (i % 4 == 0) ? $urandom_range(1, 255) : $urandom();
      if (i == 1) begin x0 = 32'hFFFF_FFFF; y0 = 32'd1; end
      if (i == 2) begin x0 = 32'd77; y0 = 32'd77; end
      if (i == 3) begin x0 = 32'd128; y0 = 32'd11; end   // worked example at the default size
      s0 = 1'b1;
      tick();
      s0 = 1'b0;
      cyc = 1;
      while (!d0 && cyc < 100) begin tick(); cyc++; end
      chk(cyc == 39, $sformatf("default: done after %0d clocks", cyc));
      num   = longint'(x0) << 7;
      exp_q = (y0 == 0) ? '1 : num / longint'(y0);
      chk(q0 == 39'(exp_q), $sformatf("default: %0d/%0d got %0d exp %0d", x0, y0, q0, exp_q));
      chk(r0 == 39'(num - exp_q * y0), $sformatf("default: %0d/%0d remainder %0d", x0, y0, r0));
    end

    // Fractional divisor: value y2/4, quotient q2/32 = floor(x2*4*32/y2)/32.
    for (int i = 0; i < 100; i++) begin
      x2 = 4'($urandom());
      y2 = 4'($urandom_range(1, 15));
      s2 = 1'b1;
      tick();
      s2 = 1'b0;
      cyc = 1;
      while (!d2 && cyc < 100) begin tick(); cyc++; end
      chk(cyc == 11, $sformatf("frac: done after %0d clocks", cyc));
      exp_q = (longint'(x2) * 128) / longint'(y2);
      chk(q2 == 11'(exp_q), $sformatf("frac: %0d/(%0d/4) got %0d exp %0d", x2, y2, q2, exp_q));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
