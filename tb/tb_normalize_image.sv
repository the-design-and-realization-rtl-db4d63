// tb_normalize_image: normalizes a whole synthetic fingerprint-like image and
// checks the statistics of the result.
//
// A 64 x 64 image of slanted sinusoidal ridges with low contrast and an offset
// gray level (values about 85..135) is generated here. Its mean and variance
// are computed in the testbench, the normalizer is configured with them and a
// target mean 100 / variance 100, and the whole image is streamed at one pixel
// per clock. Checks: every pixel comes back, the stream takes exactly
// pixels + 19 clocks, and the output image has mean within 1.5 of 100 and
// variance within 10 % of 100 (no pixel needs clamping for these targets).
module tb_normalize_image;
  localparam int unsigned ROWS = 64, COLS = 64, NPIX = ROWS * COLS, LAT = 19;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       cfg_start, cfg_ready, pix_valid, pix_ready, out_valid;
  logic [7:0] mean, m0, pix_in, pix_out;
  logic [15:0] variance, var0, sqrt_var0, sqrt_var;

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

  byte unsigned img [NPIX];
  int  unsigned n_out = 0;
  real sum_o = 0.0, sum2_o = 0.0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out  <= n_out + 1;
      sum_o  <= sum_o + real'(pix_out);
      sum2_o <= sum2_o + real'(pix_out) * real'(pix_out);
    end
  end

  initial begin
    real s, s2, mu, vr, mo, vo, ph;
    int  t0, c;
    cfg_start = 1'b0; pix_valid = 1'b0; pix_in = '0;
    mean = '0; variance = '0; m0 = '0; var0 = '0;

    // Ridge pattern: period ~8 pixels, slanted, with slow contrast drift.
    s = 0.0; s2 = 0.0;
    for (int r = 0; r < ROWS; r++)
      for (int col = 0; col < COLS; col++) begin
        ph = 2.0 * 3.14159265 * (real'(r) * 0.6 + real'(col) * 0.8) / 8.0;
        img[r * COLS + col] = byte'($rtoi(110.0 + (20.0 + 5.0 * real'(r) / ROWS) * $sin(ph) + 0.5));
        s  += real'(img[r * COLS + col]);
        s2 += real'(img[r * COLS + col]) * real'(img[r * COLS + col]);
      end
    mu = s / NPIX;
    vr = s2 / NPIX - mu * mu;
    $display("input image: mean %f variance %f", mu, vr);

    repeat (3) tick();
    rst_n = 1'b1;
    tick();
    mean = 8'($rtoi(mu + 0.5)); variance = 16'($rtoi(vr + 0.5)); m0 = 8'd100; var0 = 16'd100;
    cfg_start = 1'b1;
    tick();
    cfg_start = 1'b0;
    c = 0;
    while (!cfg_ready && c < 1000) begin tick(); c++; end
    chk(cfg_ready, "configuration never finished");

    t0 = 0;
    for (int i = 0; i < NPIX; i++) begin
      pix_valid = 1'b1;
      pix_in    = img[i];
      tick();
      t0++;
    end
    pix_valid = 1'b0;
    while (n_out < NPIX && t0 < NPIX + 100) begin tick(); t0++; end
    chk(n_out == NPIX, $sformatf("%0d of %0d pixels returned", n_out, NPIX));
    // Last pixel in clock NPIX-1, its result LAT clocks later, counted one
    // clock after it is seen.
    chk(t0 == NPIX + LAT, $sformatf("stream took %0d clocks", t0));
    mo = sum_o / NPIX;
    vo = sum2_o / NPIX - mo * mo;
    $display("output image: mean %f variance %f", mo, vo);
    chk(mo > 98.5 && mo < 101.5, $sformatf("output mean %f", mo));
    chk(vo > 90.0 && vo < 110.0, $sformatf("output variance %f", vo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPIX + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
