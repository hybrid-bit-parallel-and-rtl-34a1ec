// sem_separator: sign / exponent / mantissa separator.
//
// Splits one packed operand word into the three fields the PE works on, using
// the run-time format (see hybrid_pkg): the mantissa field occupies the low
// man_bits bits, the exponent field the next exp_bits bits and the optional
// sign bit the bit above them. For a float the implicit leading one is placed
// at bit man_bits when the exponent field is non-zero; an exponent field of 0
// is a subnormal and is reported as effective exponent 1 without the implicit
// one. For an integer (exp_bits = 0) the exponent is 0 and the mantissa is the
// integer magnitude. man_len is the number of mantissa bits that can be set,
// which sets how many primitives the multiplier path has to handle.
//
// Purely combinational. The separator and its place between the buffers and
// the sub-blocks follow the PE diagram; the field order, the subnormal rule
// and the integer encoding are this design's choices.
module sem_separator
  import hybrid_pkg::*;
#(
  parameter int REGISTER_WIDTH = 16
) (
  input  logic [REGISTER_WIDTH-1:0]         word,
  input  fmt_t                              fmt,
  output logic                              sign,
  output logic [REGISTER_WIDTH-1:0]         exp,
  output logic [REGISTER_WIDTH-1:0]         man,
  output logic [$clog2(REGISTER_WIDTH+1):0] man_len
);
  localparam int W = REGISTER_WIDTH;

  logic [W-1:0] man_field, exp_field, above_man;
  logic         implicit_one;
  int           mb, eb;

  always_comb begin
    mb        = int'(fmt.man_bits);
    eb        = int'(fmt.exp_bits);
    man_field = (mb >= W) ? word : (word & ~({W{1'b1}} << mb));
    above_man = (mb >= W) ? '0 : (word >> mb);
    exp_field = (eb >= W) ? above_man : (above_man & ~({W{1'b1}} << eb));
    sign      = fmt.sign_en && (mb + eb < W) && word[(mb + eb) % W];

    if (eb == 0) begin
      implicit_one = 1'b0;
      exp          = '0;
      man          = man_field;
      man_len      = ($bits(man_len))'(mb);
    end else begin
      implicit_one = (exp_field != '0);
      exp          = implicit_one ? exp_field : W'(1);
      man          = (mb < W) ? (man_field | (W'(implicit_one) << mb)) : man_field;
      man_len      = ($bits(man_len))'(mb + 1);
    end
  end
endmodule
