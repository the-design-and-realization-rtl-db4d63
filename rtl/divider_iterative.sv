// divider_iterative: adjustable-precision divider, one quotient bit per clock.
//
// Operands are unsigned fixed-point numbers: the dividend has DVD_I integer and
// DVD_F fraction bits, the divisor DVS_I and DVS_F, and the quotient is produced
// with Q_I integer and Q_F fraction bits. Precision is set by these parameters
// alone: no fixed-point scaling is needed, the operands are just "initialized"
// by appending zeros (see divider_pkg): the dividend gets DVS_F+Q_F-DVD_F zeros,
// the divisor Q_I+Q_F zeros.
//
// One sub_divider step is applied per clock, its three outputs fed back into
// its inputs through registers. In the clock where start is sampled the step
// works on the freshly initialized operands and an all-zero quotient; after
// Q_I+Q_F clocks in total the divisor has been shifted back to its original
// value and the quotient is complete. done then pulses for one clock with
// quotient and remainder valid; they hold until the next start. busy is high
// while steps remain. A start while busy is ignored.
//
// Timing: start in cycle t, done (and the result) in cycle t+Q_I+Q_F; a new
// division may be started in the done cycle. Example: 128/11 with a 4.7
// quotient takes 11 clocks and yields 1011.1010001.
//
// The quotient must fit in Q_I integer bits; choosing Q_I is the user's job, as
// in the documented method. A zero divisor gives an all-ones quotient.
// Remainder: the final partial dividend, in units of 2^-(DVS_F+Q_F) of the
// original dividend scale. Default parameters: 32-bit integer operands (the
// documented synthesis size) with a 32.7 quotient (7 fraction bits as in the
// worked example; 32 integer bits so that any 32-bit quotient fits).
module divider_iterative
  import divider_pkg::*;
#(
  parameter int unsigned DVD_I = 32,
  parameter int unsigned DVD_F = 0,
  parameter int unsigned DVS_I = 32,
  parameter int unsigned DVS_F = 0,
  parameter int unsigned Q_I   = 32,
  parameter int unsigned Q_F   = 7,
  localparam int unsigned DVD_W = DVD_I + DVD_F,
  localparam int unsigned DVS_W = DVS_I + DVS_F,
  localparam int unsigned Q_W   = Q_I + Q_F,
  localparam int unsigned A_W   = dividend_init_w(DVD_I, DVD_F, DVS_F, Q_F),
  localparam int unsigned B_W   = divisor_init_w(DVS_I, DVS_F, Q_I, Q_F)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DVD_W-1:0] dividend,
  input  logic [DVS_W-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [Q_W-1:0]   quotient,
  output logic [A_W-1:0]   remainder
);
  localparam int unsigned SA = dividend_shift(DVD_F, DVS_F, Q_F);
  localparam int unsigned CW = $clog2(Q_W + 1);

  // Initialization is only legal when the dividend needs no right shift.
  initial assert (DVS_F + Q_F >= DVD_F && Q_W >= 2)
    else $error("divider_iterative: need DVS_F+Q_F >= DVD_F and Q_I+Q_F >= 2");

  logic [A_W-1:0] dvd_q, dvd_in, dvd_nx;
  logic [B_W-1:0] dvs_q, dvs_in, dvs_nx;
  logic [Q_W-1:0] res_q, res_in, res_nx;
  logic [CW-1:0]  steps_left;
  logic           load;

  assign load = start && !busy;

  // Operand initialization feeds the step directly in the start cycle.
  always_comb begin
    if (load) begin
      dvd_in = {dividend, SA'(0)};
      dvs_in = {divisor, Q_W'(0)};
      res_in = '0;
    end else begin
      dvd_in = dvd_q;
      dvs_in = dvs_q;
      res_in = res_q;
    end
  end

  sub_divider #(.A_W(A_W), .B_W(B_W), .Q_W(Q_W)) u_step (
    .dividend_in (dvd_in),
    .divisor_in  (dvs_in),
    .result_in   (res_in),
    .dividend_out(dvd_nx),
    .divisor_out (dvs_nx),
    .result_out  (res_nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd_q      <= '0;
      dvs_q      <= '0;
      res_q      <= '0;
      steps_left <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load || busy) begin
        dvd_q <= dvd_nx;
        dvs_q <= dvs_nx;
        res_q <= res_nx;
      end
      if (load) begin
        steps_left <= CW'(Q_W - 1);
        busy       <= 1'b1;
      end else if (busy) begin
        steps_left <= steps_left - 1'b1;
        if (steps_left == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = res_q;
  assign remainder = dvd_q;

endmodule
