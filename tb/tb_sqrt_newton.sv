// tb_sqrt_newton: self-checking test of the Newton square-root unit.
//
// For each radicand the expected root is computed here by an independent model
// of the fixed-point procedure: floor(sqrt(a)) as the start value, then three
// Newton steps m' = (m + q) / 2 where q = a / m truncated to 2, 4 and 8 fraction
// bits. The unit's root must match that model exactly and lie within 3/256 of
// the real square root. The worked example sqrt(5) ~ 2.2360679 is included. The
// clock count from start to done must be 1 + 8 + sum(1 + 9 + F_k) + 1 = 54
// (10 for a zero radicand).
module tb_sqrt_newton;
  localparam int unsigned A_W = 16, SF = 8, ITERS = 3, H = A_W / 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             start, busy, done;
  logic [A_W-1:0]   a;
  logic [H+SF-1:0]  root;

  sqrt_newton #(.A_W(A_W), .SF(SF), .ITERS(ITERS)) dut (
    .clk, .rst_n, .start, .radicand(a), .busy, .done, .root);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  function automatic longint unsigned model(longint unsigned av, output int cycles);
    longint unsigned s, m, q, sum;
    int f;
    s = 0;
    while ((s + 1) * (s + 1) <= av) s++;
    cycles = 1 + H + 1;
    if (s == 0) return 0;
    m = s << SF;
    for (int k = 0; k < ITERS; k++) begin
      f = SF >> (ITERS - 1 - k);
      if (f == 0) f = 1;
      q = (av << (f + SF)) / m;
      q = q & ((64'd1 << (H + 1 + f)) - 1);
      sum = m + (q << (SF - f));
      m = sum >> 1;
      if (m > (64'd1 << (H + SF)) - 1) m = (64'd1 << (H + SF)) - 1;
      cycles += 1 + (H + 1 + f);
    end
    return m;
  endfunction

  task automatic run(input longint unsigned av);
    longint unsigned exp_r;
    int exp_c, c;
    real err;
    exp_r = model(av, exp_c);
    a = A_W'(av);
    start = 1'b1;
    tick();
    start = 1'b0;
    c = 1;
    while (!done && c < 500) begin tick(); c++; end
    chk(root == (H + SF)'(exp_r), $sformatf("sqrt(%0d): got %0d exp %0d", av, root, exp_r));
    chk(c == exp_c, $sformatf("sqrt(%0d): %0d clocks, exp %0d", av, c, exp_c));
    err = real'(root) / 256.0 - $sqrt(real'(av));
    if (err < 0) err = -err;
    chk(err < 3.0 / 256.0, $sformatf("sqrt(%0d) = %f off by %f", av, real'(root) / 256.0, err));
    tick();
  endtask

  initial begin
    start = 1'b0; a = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    run(5);
    // 2 -> 2.25 -> 2.21875 -> 2.234375 (0x23C) with 2, 4 and 8 fraction bits
    chk(root == 16'h023C, $sformatf("sqrt(5) -> %h", root));
    run(0);
    run(1);
    run(2);
    run(65535);
    run(65025);
    run(100);
    for (int i = 0; i < 150; i++) run($urandom_range(0, (1 << A_W) - 1));
    for (int i = 0; i < 50; i++) run($urandom_range(0, 300));
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
