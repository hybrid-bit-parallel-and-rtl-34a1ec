// hybrid_pkg: types and helper functions shared by the hybrid bit-parallel /
// bit-serial processing element.
//
// Number format. Every operand is described at run time by a fmt_t: an
// optional sign bit (MSB of the word), exp_bits exponent bits and man_bits
// mantissa bits, packed from the MSB down as {sign, exponent, mantissa} and
// right-aligned in the operand register. exp_bits = 0 selects an integer in
// sign-magnitude (sign_en = 1) or unsigned (sign_en = 0) form. exp_bits > 0
// selects an IEEE-754-style float with bias 2^(exp_bits-1)-1, an implicit
// leading one for normal numbers and subnormals for an exponent field of 0.
// Infinities and NaNs are not given special treatment.
//
// Configuration vector. The PE is built from eight dual-mode sub-blocks; the
// 8-bit CONFIG vector selects each block's mode, 1 = bit-parallel,
// 0 = bit-serial, in the bit order {Mul, Add, Accu, CST, EN, IOrg, PG, SA}
// (bit 7 .. bit 0), e.g. 8'b1010_0000 = parallel multiplier and accumulator.
package hybrid_pkg;

  // Operand format, supplied at run time with each operation.
  typedef struct packed {
    logic       sign_en;   // 1: MSB of the field is a sign bit
    logic [5:0] exp_bits;  // exponent field width, 0 = integer
    logic [5:0] man_bits;  // mantissa (fraction / integer) field width
  } fmt_t;

  // Bit positions of the sub-block modes in the CONFIG vector.
  localparam int CFG_MUL  = 7;
  localparam int CFG_ADD  = 6;
  localparam int CFG_ACCU = 5;
  localparam int CFG_CST  = 4;
  localparam int CFG_EN   = 3;
  localparam int CFG_IORG = 2;
  localparam int CFG_PG   = 1;
  localparam int CFG_SA   = 0;

  // States of the bit-serial controller inside every dual-mode block:
  // wait for start, latch operands, process one item per cycle, signal done.
  typedef enum logic [1:0] {
    S_IDLE    = 2'd0,
    S_LOAD    = 2'd1,
    S_PROCESS = 2'd2,
    S_DONE    = 2'd3
  } ser_state_t;

  // Width of the signed exponents inside the PE for a given register width:
  // the sum of two biased exponents, the format offset, normalization
  // adjustments and accumulation carries all fit with margin.
  function automatic int exp_w(int register_width);
    return register_width + 6;
  endfunction

  // Exponent bias of a format: 2^(e-1)-1 for floats, 0 for integers.
  function automatic int fmt_bias(fmt_t f);
    if (f.exp_bits == 6'd0) return 0;
    return (1 << (int'(f.exp_bits) - 1)) - 1;
  endfunction

  // Number of fraction bits that sit right of the binary point: the mantissa
  // field for floats, none for integers.
  function automatic int fmt_frac(fmt_t f);
    return (f.exp_bits == 6'd0) ? 0 : int'(f.man_bits);
  endfunction

  // Constant the exponent adder adds to the two effective biased exponents so
  // that its result is the binary exponent of the raw mantissa product:
  // value(product) = P * 2^(ea + eb + offset).
  function automatic int exp_offset(fmt_t fa, fmt_t fb);
    return -(fmt_bias(fa) + fmt_bias(fb) + fmt_frac(fa) + fmt_frac(fb));
  endfunction

endpackage
