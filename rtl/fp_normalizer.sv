// fp_normalizer: fingerprint image normalization built on the
// adjustable-precision dividers.
//
// Each gray level I is mapped to
//     N = M0 + |I - M| * sqrt(VAR0) / sqrt(VAR)   if I > M
//     N = M0 - |I - M| * sqrt(VAR0) / sqrt(VAR)   otherwise
// where M and VAR are the mean and variance of the image (computed elsewhere,
// before the image is streamed) and M0, VAR0 the desired mean and variance.
// This is the usual normalization formula rewritten so that the square roots
// depend on the image only, and one division per pixel remains.
//
// Configuration: pulse cfg_start with mean, variance, m0 and var0 held. Two
// sqrt_newton units (each built on divider_iterative) compute sqrt(VAR0) and
// sqrt(VAR) in parallel, with H = VAR_W/2 integer and SF fraction bits.
// cfg_ready rises when both are done and stays high until the next cfg_start;
// a cfg_start while the roots are still being computed is ignored. pix_ready
// is cfg_ready, held low in a cfg_start cycle. Issue cfg_start only when no
// pixels are in flight.
//
// Pixel stream: while pix_ready, a pixel with pix_valid is accepted every
// clock. Stage 1 forms |I - M| * sqrt(VAR0) and remembers the sign of I - M;
// a divider_pipeline divides by sqrt(VAR) with OUT_F fraction bits of
// quotient, one result per clock; the last stage rounds the quotient to an
// integer, adds it to or subtracts it from M0 and clamps to 0..2^PIX_W-1.
// Latency from pix_valid to out_valid: PIX_W + H + OUT_F + 2 clocks (19 at the
// defaults), in order, no stalls.
//
// What follows the source method: the formula, square roots by Newton steps on
// dividers of rising precision, a pipelined divider for the per-pixel work.
// This design's choices: 8-bit pixels and integer mean, 16-bit integer
// variances, 8 fraction bits for the roots, one quotient fraction bit for
// rounding, clamping. A zero variance makes the divisor zero; the quotient is
// then all ones and the output clamps to 0 or 2^PIX_W-1.
module fp_normalizer #(
  parameter int unsigned PIX_W = 8,   // gray-level width
  parameter int unsigned VAR_W = 16,  // variance width (even)
  parameter int unsigned SF    = 8,   // fraction bits of the square roots
  parameter int unsigned ITERS = 3,   // Newton steps per square root
  parameter int unsigned OUT_F = 1,   // quotient fraction bits kept for rounding
  localparam int unsigned H     = VAR_W / 2,
  localparam int unsigned R_W   = H + SF
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration, once per image
  input  logic             cfg_start,
  input  logic [PIX_W-1:0] mean,
  input  logic [VAR_W-1:0] variance,
  input  logic [PIX_W-1:0] m0,
  input  logic [VAR_W-1:0] var0,
  output logic             cfg_ready,
  output logic [R_W-1:0]   sqrt_var0,
  output logic [R_W-1:0]   sqrt_var,
  // pixel stream
  input  logic             pix_valid,
  input  logic [PIX_W-1:0] pix_in,
  output logic             pix_ready,
  output logic             out_valid,
  output logic [PIX_W-1:0] pix_out
);
  localparam int unsigned P_W = PIX_W + R_W;   // product |I-M|*sqrt(VAR0)
  localparam int unsigned QI  = PIX_W + H;     // quotient integer bits
  localparam int unsigned Q_W = QI + OUT_F;
  localparam int unsigned A_W = divider_pkg::dividend_init_w(PIX_W + H, SF, SF, OUT_F);

  // ---------------------------------------------------------------- config
  logic [PIX_W-1:0] mean_q, m0_q;
  logic             s0_busy, s0_done, s_busy, s_done;
  logic             s0_ok, s_ok;
  logic             cfg_go;

  // A configuration request is taken only while both roots are idle.
  assign cfg_go = cfg_start && !s0_busy && !s_busy;

  sqrt_newton #(.A_W(VAR_W), .SF(SF), .ITERS(ITERS)) u_sqrt_var0 (
    .clk(clk), .rst_n(rst_n), .start(cfg_go), .radicand(var0),
    .busy(s0_busy), .done(s0_done), .root(sqrt_var0)
  );

  sqrt_newton #(.A_W(VAR_W), .SF(SF), .ITERS(ITERS)) u_sqrt_var (
    .clk(clk), .rst_n(rst_n), .start(cfg_go), .radicand(variance),
    .busy(s_busy), .done(s_done), .root(sqrt_var)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean_q <= '0;
      m0_q   <= '0;
      s0_ok  <= 1'b0;
      s_ok   <= 1'b0;
    end else if (cfg_go) begin
      mean_q <= mean;
      m0_q   <= m0;
      s0_ok  <= 1'b0;
      s_ok   <= 1'b0;
    end else begin
      if (s0_done) s0_ok <= 1'b1;
      if (s_done)  s_ok  <= 1'b1;
    end
  end

  assign cfg_ready = s0_ok && s_ok && !s0_busy && !s_busy;
  assign pix_ready = cfg_ready && !cfg_start;

  // ---------------------------------------------------------------- stage 1
  logic             p1_valid, p1_above;
  logic [P_W-1:0]   p1_prod;
  logic [PIX_W-1:0] absdiff;
  logic             above;

  always_comb begin
    above   = pix_in > mean_q;
    absdiff = above ? pix_in - mean_q : mean_q - pix_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_valid <= 1'b0;
      p1_above <= 1'b0;
      p1_prod  <= '0;
    end else begin
      p1_valid <= pix_valid && pix_ready;
      p1_above <= above;
      p1_prod  <= P_W'(absdiff) * P_W'(sqrt_var0);
    end
  end

  // ---------------------------------------------------------------- divide
  logic             d_valid;
  logic [Q_W-1:0]   d_q;
  logic [A_W-1:0]   d_rem;
  logic             d_above;

  divider_pipeline #(
    .DVD_I(PIX_W + H), .DVD_F(SF), .DVS_I(H), .DVS_F(SF),
    .Q_I(QI), .Q_F(OUT_F), .TAG_W(1)
  ) u_div (
    .clk(clk), .rst_n(rst_n),
    .in_valid(p1_valid), .dividend(p1_prod), .divisor(sqrt_var), .in_tag(p1_above),
    .out_valid(d_valid), .quotient(d_q), .remainder(d_rem), .out_tag(d_above)
  );

  // ---------------------------------------------------------------- output
  localparam int unsigned N_W = QI + 2;   // signed working width
  logic [QI:0]           q_round;
  logic signed [N_W-1:0] n_val;

  always_comb begin
    if (OUT_F == 0) q_round = (QI + 1)'(d_q);
    else            q_round = (QI + 1)'((Q_W + 1)'(d_q) + (Q_W + 1)'(1 << (OUT_F - 1)) >> OUT_F);
    if (d_above) n_val = $signed(N_W'(m0_q)) + $signed(N_W'(q_round));
    else         n_val = $signed(N_W'(m0_q)) - $signed(N_W'(q_round));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pix_out   <= '0;
    end else begin
      out_valid <= d_valid;
      if (n_val < 0)                                      pix_out <= '0;
      else if (n_val > $signed(N_W'({PIX_W{1'b1}})))      pix_out <= '1;
      else                                                pix_out <= n_val[PIX_W-1:0];
    end
  end

endmodule
