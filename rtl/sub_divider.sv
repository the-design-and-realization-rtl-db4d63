// sub_divider: one step of the shift-compare-subtract division.
//
// The divisor entering the step is shifted right by one bit and compared with
// the partial dividend. When the dividend is not smaller, the shifted divisor is
// subtracted from it and a 1 is shifted into the quotient from the right;
// otherwise the dividend passes unchanged and a 0 is shifted in. The shifted
// divisor leaves on divisor_out so that the next step (the same block fed back
// through registers, or the next stage of a pipeline) shifts it once more.
//
// Interface: dividend_in/divisor_in/result_in -> dividend_out/divisor_out/
// result_out, all purely combinational. Widths are parameters; the defaults fit
// a 32-bit integer dividend and divisor with a 32.7 quotient.
//
// The structure (right shifter on the divisor, comparator, subtractor, left
// shifter on the quotient taking a 1 or a 0) is the documented one. The
// comparison counts equality as "dividend bigger", which exact division needs.
// The subtraction is written as a plain "-" so that synthesis can pick a fast
// (for example carry-look-ahead) adder.
module sub_divider #(
  parameter int unsigned A_W = 39,  // partial dividend width
  parameter int unsigned B_W = 71,  // divisor width
  parameter int unsigned Q_W = 39   // quotient width
) (
  input  logic [A_W-1:0] dividend_in,
  input  logic [B_W-1:0] divisor_in,
  input  logic [Q_W-1:0] result_in,
  output logic [A_W-1:0] dividend_out,
  output logic [B_W-1:0] divisor_out,
  output logic [Q_W-1:0] result_out
);
  localparam int unsigned W = (A_W > B_W) ? A_W : B_W;

  logic [W-1:0] dvd_ext, dvs_ext, diff;
  logic         ge;

  always_comb begin
    divisor_out = divisor_in >> 1;
    dvd_ext     = W'(dividend_in);
    dvs_ext     = W'(divisor_out);
    ge          = (dvd_ext >= dvs_ext);
    diff        = dvd_ext - dvs_ext;
    // When ge holds the difference is below the dividend, so it fits in A_W.
    dividend_out = ge ? diff[A_W-1:0] : dividend_in;
    result_out   = {result_in[Q_W-2:0], ge};
  end

endmodule
