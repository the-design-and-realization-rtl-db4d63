// tb_divider_pipeline: self-checking test of the pipelined divider.
//
// The default configuration (32-bit operands, 32.7 quotient, 39 stages) is
// fed a new random division on most clocks, with occasional bubbles. Every
// accepted operand pair is queued with its issue cycle; each result must come
// out in order, exactly 39 clocks after its operands, carrying its tag, with
// quotient floor(dividend * 2^7 / divisor) and the matching remainder. A
// second instance in the 8 / 4 -> 4.7 format of the worked example must give
// 128 / 11 = 1011.1010001 after 11 clocks. Back-to-back results (one per
// clock) are counted and must occur.
module tb_divider_pipeline;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  logic        iv, ov;
  logic [31:0] x, y;
  logic [38:0] q, r;
  logic [3:0]  ti, to;
  divider_pipeline #(.TAG_W(4)) u0 (
    .clk, .rst_n, .in_valid(iv), .dividend(x), .divisor(y), .in_tag(ti),
    .out_valid(ov), .quotient(q), .remainder(r), .out_tag(to));

  logic        iv1, ov1;
  logic [7:0]  x1;
  logic [3:0]  y1;
  logic [10:0] q1;
  logic [14:0] r1;
  logic        to1;
  divider_pipeline #(.DVD_I(8), .DVS_I(4), .Q_I(4), .Q_F(7), .TAG_W(1)) u1 (
    .clk, .rst_n, .in_valid(iv1), .dividend(x1), .divisor(y1), .in_tag(1'b1),
    .out_valid(ov1), .quotient(q1), .remainder(r1), .out_tag(to1));

  typedef struct {
    longint unsigned q;
    longint unsigned r;
    logic [3:0]      tag;
    int unsigned     t;
  } exp_t;
  exp_t sb[$];
  int   results = 0, back_to_back = 0;
  bit   prev_ov = 1'b0;

  // Output monitor, sampled just after each edge.
  initial begin
    exp_t e;
    forever begin
      tick();
      if (ov) begin
        results++;
        if (prev_ov) back_to_back++;
        if (sb.size() == 0) chk(1'b0, "result with no operands issued");
        else begin
          e = sb.pop_front();
          chk(q == 39'(e.q) && r == 39'(e.r) && to == e.tag,
              $sformatf("got q=%0d r=%0d tag=%0d exp q=%0d r=%0d tag=%0d", q, r, to, e.q, e.r, e.tag));
          chk(cycle - e.t == 39, $sformatf("latency %0d", cycle - e.t));
        end
      end
      prev_ov = ov;
    end
  end

  initial begin
    exp_t e;
    longint unsigned num;
    iv = 1'b0; x = '0; y = '0; ti = '0; iv1 = 1'b0; x1 = '0; y1 = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // Worked example on the narrow instance.
    x1 = 8'd128; y1 = 4'd11; iv1 = 1'b1;
    tick();
    iv1 = 1'b0;
    for (int k = 1; k < 11; k++) begin
      chk(!ov1, "narrow: early result");
      tick();
    end
    chk(ov1 && q1 == 11'b1011_1010001 && r1 == 15'd5, $sformatf("narrow: 128/11 -> %b rem %0d", q1, r1));

    // Random stream on the default instance.
    for (int i = 0; i < 400; i++) begin
      iv = ($urandom_range(0, 7) != 0);
      x  = $urandom();
      y  = (i % 3 == 0) ? $urandom_range(1, 1000) : $urandom_range(1, 32'hFFFF_FFFF);
      ti = 4'(i);
      if (iv) begin
        num  = longint'(x) << 7;
        e.q  = num / longint'(y);
        e.r  = num - e.q * longint'(y);
        e.tag = ti;
        e.t  = cycle;       // cycle in which the operands are presented
        sb.push_back(e);
      end
      tick();
    end
    iv = 1'b0;
    repeat (45) tick();
    chk(sb.size() == 0, $sformatf("%0d results missing", sb.size()));
    chk(back_to_back > 0, "no back-to-back results");
    $display("results=%0d back_to_back=%0d", results, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
