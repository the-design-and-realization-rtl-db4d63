// tb_fp_normalizer: end-to-end test of the normalization unit at its default
// parameters.
//
// Several images are configured in turn (mean, variance, desired mean and
// variance). For each, the two square roots reported by the unit are compared
// with an independent model of the Newton procedure, then a stream of random
// pixels is sent, mostly back to back. Every output pixel is compared with
// N = clamp(M0 +/- round(|I - M| * sqrt(VAR0) / sqrt(VAR))), computed here
// from the model roots with the same fixed-point steps, and must arrive
// exactly 19 clocks after its pixel, in order.
//
// Mechanisms counted (each must occur at least once): square-root
// configuration, reconfiguration of a second image, pixel above the mean,
// pixel at or below the mean, clamp to 255, clamp to 0, one output per clock,
// pixel held off while configuration is running, configuration request
// ignored while the roots are running.
module tb_fp_normalizer;
  localparam int unsigned PIX_W = 8, VAR_W = 16, SF = 8, ITERS = 3, OUT_F = 1, H = VAR_W / 2;
  localparam int unsigned LAT = PIX_W + H + OUT_F + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic             cfg_start, cfg_ready, pix_valid, pix_ready, out_valid;
  logic [PIX_W-1:0] mean, m0, pix_in, pix_out;
  logic [VAR_W-1:0] variance, var0;
  logic [H+SF-1:0]  sqrt_var0, sqrt_var;

  fp_normalizer dut (
    .clk, .rst_n, .cfg_start, .mean, .variance, .m0, .var0, .cfg_ready,
    .sqrt_var0, .sqrt_var, .pix_valid, .pix_in, .pix_ready, .out_valid, .pix_out);

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

  // Fixed-point Newton square root, H.SF result.
  function automatic longint unsigned sqrt_model(longint unsigned av);
    longint unsigned s, m, q;
    int f;
    s = 0;
    while ((s + 1) * (s + 1) <= av) s++;
    if (s == 0) return 0;
    m = s << SF;
    for (int k = 0; k < ITERS; k++) begin
      f = SF >> (ITERS - 1 - k);
      if (f == 0) f = 1;
      q = ((av << (f + SF)) / m) & ((64'd1 << (H + 1 + f)) - 1);
      m = (m + (q << (SF - f))) >> 1;
      if (m > (64'd1 << (H + SF)) - 1) m = (64'd1 << (H + SF)) - 1;
    end
    return m;
  endfunction

  typedef struct {
    logic [PIX_W-1:0] n;
    int unsigned      t;
  } exp_t;
  exp_t sb[$];

  int n_cfg = 0, n_above = 0, n_below = 0, n_clamp_hi = 0, n_clamp_lo = 0;
  int n_b2b = 0, n_held = 0, n_out = 0, n_ignored = 0;
  bit prev_ov = 1'b0;

  // Output monitor.
  initial begin
    exp_t e;
    forever begin
      tick();
      if (out_valid) begin
        n_out++;
        if (prev_ov) n_b2b++;
        if (sb.size() == 0) chk(1'b0, "output with no pixel in flight");
        else begin
          e = sb.pop_front();
          chk(pix_out == e.n, $sformatf("pixel out %0d exp %0d", pix_out, e.n));
          chk(cycle - e.t == LAT, $sformatf("latency %0d exp %0d", cycle - e.t, LAT));
        end
      end
      prev_ov = out_valid;
    end
  end

  longint unsigned s0_m, s_m;
  logic [PIX_W-1:0] cur_mean, cur_m0;

  task automatic configure(input int mv, input int vv, input int m0v, input int v0v,
                           input bit poke = 1'b0);
    int c;
    mean = PIX_W'(mv); variance = VAR_W'(vv); m0 = PIX_W'(m0v); var0 = VAR_W'(v0v);
    cur_mean = PIX_W'(mv); cur_m0 = PIX_W'(m0v);
    cfg_start = 1'b1;
    tick();
    cfg_start = 1'b0;
    c = 1;
    // A second request while the roots are running must be ignored.
    if (poke) begin
      mean = ~mean; variance = variance + 16'd1000; var0 = var0 + 16'd1000;
      cfg_start = 1'b1;
      chk(!pix_ready, "pix_ready high in a cfg_start cycle");
      tick();
      cfg_start = 1'b0;
      c++;
      n_ignored++;
    end
    // A pixel offered during configuration must be held off.
    pix_valid = 1'b1; pix_in = 8'd7;
    while (!cfg_ready && c < 1000) begin
      if (!pix_ready) n_held++;
      tick(); c++;
    end
    pix_valid = 1'b0;
    chk(cfg_ready, "configuration never finished");
    s0_m = sqrt_model(v0v);
    s_m  = sqrt_model(vv);
    chk(sqrt_var0 == (H + SF)'(s0_m), $sformatf("sqrt(VAR0=%0d) %0d exp %0d", v0v, sqrt_var0, s0_m));
    chk(sqrt_var == (H + SF)'(s_m), $sformatf("sqrt(VAR=%0d) %0d exp %0d", vv, sqrt_var, s_m));
    n_cfg++;
  endtask

  function automatic logic [PIX_W-1:0] norm_model(int unsigned iv);
    longint unsigned d, prod, q, qr;
    longint n;
    bit above;
    above = iv > cur_mean;
    d     = above ? iv - cur_mean : cur_mean - iv;
    prod  = d * s0_m;
    q     = (s_m == 0) ? '1 : (prod << OUT_F) / s_m;
    q     = q & ((64'd1 << (PIX_W + H + OUT_F)) - 1);
    qr    = (q + (1 << (OUT_F - 1))) >> OUT_F;
    n     = above ? longint'(cur_m0) + longint'(qr) : longint'(cur_m0) - longint'(qr);
    if (above) n_above++; else n_below++;
    if (n < 0) begin n_clamp_lo++; return '0; end
    if (n > 255) begin n_clamp_hi++; return '1; end
    return PIX_W'(n);
  endfunction

  task automatic stream(input int count);
    exp_t e;
    for (int i = 0; i < count; i++) begin
      pix_valid = ($urandom_range(0, 9) != 0);
      pix_in    = PIX_W'($urandom());
      if (pix_valid) begin
        e.n = norm_model(pix_in);
        e.t = cycle;
        sb.push_back(e);
      end
      tick();
    end
    pix_valid = 1'b0;
    repeat (LAT + 2) tick();
    chk(sb.size() == 0, $sformatf("%0d pixels lost", sb.size()));
  endtask

  initial begin
    cfg_start = 1'b0; pix_valid = 1'b0; pix_in = '0;
    mean = '0; variance = '0; m0 = '0; var0 = '0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    configure(120, 900, 100, 100);     // gain 1/3: no clamping
    stream(300);
    configure(128, 16, 128, 2500, 1'b1);   // gain 12.5: clamps both ways
    stream(300);
    configure(90, 2000, 100, 1000);
    stream(300);
    configure($urandom_range(0, 255), $urandom_range(1, 65535), $urandom_range(0, 255), $urandom_range(1, 65535));
    stream(300);
    $display("configs=%0d above=%0d below=%0d clamp_hi=%0d clamp_lo=%0d back_to_back=%0d held=%0d outputs=%0d",
             n_cfg, n_above, n_below, n_clamp_hi, n_clamp_lo, n_b2b, n_held, n_out);
    chk(n_cfg >= 2, "no reconfiguration");
    chk(n_above > 0, "no pixel above the mean");
    chk(n_below > 0, "no pixel at or below the mean");
    chk(n_clamp_hi > 0, "no clamp to the maximum");
    chk(n_clamp_lo > 0, "no clamp to zero");
    chk(n_b2b > 0, "no back-to-back outputs");
    chk(n_held > 0, "no pixel held off during configuration");
    chk(n_ignored > 0, "no configuration request during configuration");
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
