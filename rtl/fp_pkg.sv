// fp_pkg: types and constants shared by the floating-point DSP structures.
//
// Every data bus in the design carries an IEEE 754 single-precision number
// (1 sign bit, 8 exponent bits with bias 127, 23 fraction bits). The package
// holds that type, a few field helpers, the canonical quiet NaN produced by
// the arithmetic units, the coefficient set of one IIR second-order section
// and the selector for the three IIR section structures.
//
// Following the source design: 32-bit single-precision buses and the
// second-order-section coefficient names b0, b1, b2, a1, a2 with the transfer
// function (b0 + b1 z^-1 + b2 z^-2) / (1 - a1 z^-1 - a2 z^-2).
// Own choices: the canonical NaN encoding and the struct field order.
package fp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  // Coefficients of one second-order section.
  typedef struct packed {
    fp32_t b0;
    fp32_t b1;
    fp32_t b2;
    fp32_t a1;
    fp32_t a2;
  } sos_coef_t;

  // The three second-order-section realisations.
  typedef enum logic [1:0] {
    SOS_DF1  = 2'd0,
    SOS_DF2  = 2'd1,
    SOS_TDF2 = 2'd2
  } sos_struct_e;

  // The helpers take the magnitude bits [30:0] of a number.
  function automatic logic fp_is_nan(logic [30:0] m);
    return (m[30:23] == 8'hFF) && (m[22:0] != '0);
  endfunction

  function automatic logic fp_is_inf(logic [30:0] m);
    return (m[30:23] == 8'hFF) && (m[22:0] == '0);
  endfunction

  function automatic logic fp_is_zero(logic [30:0] m);
    return m[30:0] == '0;
  endfunction

  function automatic logic fp_is_subnormal(logic [30:0] m);
    return (m[30:23] == 8'h00) && (m[22:0] != '0);
  endfunction

endpackage
