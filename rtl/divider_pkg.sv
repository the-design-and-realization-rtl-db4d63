// divider_pkg: width arithmetic shared by the adjustable-precision dividers.
//
// An operand format is given by its integer and fractional bit counts. The
// divider works on "initialized" operands: the dividend and divisor with zero
// bits appended so that a plain binary long division of the two produces the
// quotient in the requested fixed-point format. The functions below compute how
// many zeros are appended and how wide the resulting registers are:
//
//   dividend_shift = DVS_F + Q_F - DVD_F   zeros appended to the dividend
//   divisor_shift  = Q_I + Q_F             zeros appended to the divisor
//
// Appending zeros to the dividend by the divisor's plus the quotient's
// fraction length, and to the divisor by the quotient length, is the
// initialization rule of the design. Subtracting the dividend's own fraction
// length generalizes it to fractional dividends (the worked examples only use
// integer dividends).
package divider_pkg;

  // Zeros appended to the dividend during initialization.
  function automatic int dividend_shift(int dvd_f, int dvs_f, int q_f);
    return dvs_f + q_f - dvd_f;
  endfunction

  // Width of the initialized dividend (partial remainder) register.
  function automatic int dividend_init_w(int dvd_i, int dvd_f, int dvs_f, int q_f);
    return dvd_i + dvd_f + dividend_shift(dvd_f, dvs_f, q_f);
  endfunction

  // Width of the initialized divisor register.
  function automatic int divisor_init_w(int dvs_i, int dvs_f, int q_i, int q_f);
    return dvs_i + dvs_f + q_i + q_f;
  endfunction

endpackage
