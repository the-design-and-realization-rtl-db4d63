// sqrt_newton: square root of an unsigned integer by Newton iteration on
// adjustable-precision dividers.
//
// The root is refined with m' = (m + a/m) / 2. The start value is the largest
// integer whose square does not exceed a, found here bit by bit (A_W/2 clocks,
// one trial square per clock). ITERS Newton steps follow, each on its own
// divider_iterative instance with a higher quotient precision than the last:
// step k (k = 0..ITERS-1) divides with max(1, SF >> (ITERS-1-k)) fraction bits,
// so with the defaults the three steps use 2, 4 and 8 fraction bits. Using a
// sequence of dividers of growing precision is the documented method; the
// bit-by-bit search for the start value and the precision schedule are this
// design's own choices.
//
// Interface: pulse start with a held on radicand; done pulses when root is
// valid. root is unsigned with A_W/2 integer and SF fraction bits and holds
// until the next start. The result saturates at all ones (only reachable for
// radicands just below 2^A_W). A zero radicand returns zero without dividing.
//
// Timing: A_W/2 clocks of search, then for each step one clock to launch the
// divider, its A_W/2+1+SF_k clocks, and one clock to update m; about 56 clocks
// at the defaults.
module sqrt_newton #(
  parameter int unsigned A_W   = 16,  // radicand width (even)
  parameter int unsigned SF    = 8,   // fraction bits of the root
  parameter int unsigned ITERS = 3    // Newton steps
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [A_W-1:0]        radicand,
  output logic                  busy,
  output logic                  done,
  output logic [A_W/2+SF-1:0]   root
);
  localparam int unsigned H   = A_W / 2;       // integer bits of the root
  localparam int unsigned R_W = H + SF;        // root width
  localparam int unsigned QI  = H + 1;         // a/m < 2^(H+1) for m >= floor(sqrt(a))
  localparam int unsigned IW  = $clog2(ITERS + 1);
  localparam int unsigned BW  = $clog2(H + 1);

  function automatic int unsigned step_frac(int unsigned k);
    int unsigned f;
    f = SF >> (ITERS - 1 - k);
    return (f == 0) ? 1 : f;
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_LAUNCH, S_WAIT, S_DONE} state_t;
  state_t state;

  logic [A_W-1:0] a_q;
  logic [H-1:0]   isq;          // integer start value under construction
  logic [BW-1:0]  bit_idx;
  logic [R_W-1:0] m_q;          // current estimate, H.SF
  logic [IW-1:0]  iter;

  // Trial for the bit-by-bit search.
  logic [H-1:0]   trial;
  logic [A_W-1:0] trial_sq;
  always_comb begin
    trial    = isq | (H'(1) << bit_idx);
    trial_sq = trial * trial;
  end

  // One divider per Newton step; quotients are aligned to SF fraction bits.
  logic [ITERS-1:0] div_start, div_done;
  logic [QI+SF-1:0] q_al [ITERS];

  for (genvar k = 0; k < ITERS; k++) begin : g_step
    localparam int unsigned QF = step_frac(k);
    logic [QI+QF-1:0] q;
    logic [A_W+SF+QF-1:0] rem_unused;

    divider_iterative #(
      .DVD_I(A_W), .DVD_F(0), .DVS_I(H), .DVS_F(SF), .Q_I(QI), .Q_F(QF)
    ) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (div_start[k]),
      .dividend (a_q),
      .divisor  (m_q),
      .busy     (),
      .done     (div_done[k]),
      .quotient (q),
      .remainder(rem_unused)
    );
    assign q_al[k] = (QI + SF)'(q) << (SF - QF);
  end

  // Newton update (m + a/m) / 2, saturated to the root width.
  logic [QI+SF:0]   sum;
  logic [QI+SF-1:0] half;
  logic [R_W-1:0]   m_nx;
  always_comb begin
    sum  = (QI + SF + 1)'(m_q) + (QI + SF + 1)'(q_al[iter]);
    half = sum[QI+SF:1];
    m_nx = (half > (QI + SF)'({R_W{1'b1}})) ? {R_W{1'b1}} : half[R_W-1:0];
  end

  always_comb begin
    div_start = '0;
    if (state == S_LAUNCH) div_start[iter] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      a_q     <= '0;
      isq     <= '0;
      bit_idx <= '0;
      m_q     <= '0;
      iter    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q     <= radicand;
          isq     <= '0;
          bit_idx <= BW'(H - 1);
          state   <= S_SEARCH;
        end
        S_SEARCH: begin
          if (trial_sq <= a_q) isq <= trial;
          if (bit_idx == '0) begin
            iter  <= '0;
            state <= S_LAUNCH;
            // The final trial decides the last bit of the start value.
            m_q   <= {((trial_sq <= a_q) ? trial : isq), SF'(0)};
            if (((trial_sq <= a_q) ? trial : isq) == '0) state <= S_DONE;
          end else begin
            bit_idx <= bit_idx - 1'b1;
          end
        end
        S_LAUNCH: state <= S_WAIT;
        S_WAIT: if (div_done[iter]) begin
          m_q <= m_nx;
          if (iter == IW'(ITERS - 1)) state <= S_DONE;
          else begin
            iter  <= iter + 1'b1;
            state <= S_LAUNCH;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign root = m_q;

endmodule
