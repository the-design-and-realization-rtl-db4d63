// tb_sub_divider: self-checking test of one division step.
//
// Drives random partial dividends, divisors and quotients into a small
// sub_divider and compares the three outputs with a reference step computed
// here with plain integer arithmetic: shift the divisor right, subtract it if
// the dividend is not smaller, append the compare bit to the quotient. Also
// replays the first steps of 128/11 (4.7 quotient) by hand-worked values.
module tb_sub_divider;
  localparam int unsigned A_W = 15, B_W = 15, Q_W = 11;

  logic [A_W-1:0] dvd_in, dvd_out;
  logic [B_W-1:0] dvs_in, dvs_out;
  logic [Q_W-1:0] res_in, res_out;
  int checks = 0, failures = 0;

  sub_divider #(.A_W(A_W), .B_W(B_W), .Q_W(Q_W)) dut (
    .dividend_in(dvd_in), .divisor_in(dvs_in), .result_in(res_in),
    .dividend_out(dvd_out), .divisor_out(dvs_out), .result_out(res_out)
  );

  task automatic check(input longint unsigned exp_dvd, exp_dvs, exp_res);
    checks++;
    if (dvd_out !== A_W'(exp_dvd) || dvs_out !== B_W'(exp_dvs) || res_out !== Q_W'(exp_res)) begin
      failures++;
      $display("FAIL in %0d/%0d/%0d: got %0d/%0d/%0d exp %0d/%0d/%0d", dvd_in, dvs_in, res_in,
               dvd_out, dvs_out, res_out, exp_dvd, exp_dvs, exp_res);
    end
  endtask

  initial begin
    longint unsigned a, b, r, bs;
    // 128/11: initialized dividend 2^14, divisor 11*2^11.
    dvd_in = 15'd16384; dvs_in = 15'(11 * 2048); res_in = '0; #1;
    check(16384 - 11264, 11264, 1);
    dvd_in = 15'd5120; dvs_in = 15'd11264; res_in = 11'd1; #1;
    check(5120, 5632, 2);
    dvd_in = 15'd5120; dvs_in = 15'd5632; res_in = 11'd2; #1;
    check(2304, 2816, 5);
    // Equality counts as "not smaller".
    dvd_in = 15'd88; dvs_in = 15'd176; res_in = '0; #1;
    check(0, 88, 1);
    for (int i = 0; i < 2000; i++) begin
      a = $urandom_range(0, (1 << A_W) - 1);
      b = $urandom_range(0, (1 << B_W) - 1);
      if (i % 3 == 0) b = a * 2 + $urandom_range(0, 3);  // near the threshold
      b = b & ((1 << B_W) - 1);
      r = $urandom_range(0, (1 << Q_W) - 1);
      dvd_in = A_W'(a); dvs_in = B_W'(b); res_in = Q_W'(r); #1;
      bs = b >> 1;
      if (a >= bs) check(a - bs, bs, ((r << 1) | 1) & ((1 << Q_W) - 1));
      else         check(a, bs, (r << 1) & ((1 << Q_W) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
