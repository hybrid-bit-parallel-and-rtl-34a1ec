// mantissa_truncation: joins the multiplier, exponent adder and sign
// analyzer results into one normalized product.
//
// The raw mantissa product P (2*REGISTER_WIDTH bits) with binary exponent ex
// is shifted so that its leading one lands on bit ACC_W-1 of an ACC_W-bit
// mantissa, and the exponent is corrected by the shift:
// value = P * 2^ex = m * 2^e. When P is wider than ACC_W the low bits are
// dropped (truncation toward zero); when it is narrower it is shifted left
// without loss. P = 0 gives m = 0, e = ex and zero = 1. The sign passes
// through.
//
// Purely combinational. The block and its inputs (sign, exponent-addition and
// mantissa-multiplication results) follow the PE diagram; normalizing to a
// leading one at bit ACC_W-1 and truncating rather than rounding are this
// design's choices.
module mantissa_truncation
  import hybrid_pkg::*;
#(
  parameter int REGISTER_WIDTH = 16,
  parameter int ACC_W          = 24,
  localparam int XW            = exp_w(REGISTER_WIDTH)
) (
  input  logic                        sign_in,
  input  logic signed [XW-1:0]        ex,
  input  logic [2*REGISTER_WIDTH-1:0] product,
  output logic                        sign,
  output logic [ACC_W-1:0]            m,
  output logic signed [XW-1:0]        e,
  output logic                        zero
);
  localparam int PW = 2 * REGISTER_WIDTH;
  localparam int TW = (PW > ACC_W) ? PW : ACC_W;

  int        lead;     // position of the leading one of the product
  logic [TW-1:0] wide;

  always_comb begin
    lead = 0;
    for (int i = 0; i < PW; i++) if (product[i]) lead = i;
    sign = sign_in;
    zero = (product == '0);
    wide = TW'(product);
    if (zero) begin
      m = '0;
      e = ex;
    end else if (lead >= ACC_W - 1) begin
      m = ACC_W'(wide >> (lead - (ACC_W - 1)));
      e = ex + XW'(lead - (ACC_W - 1));
    end else begin
      m = ACC_W'(wide << ((ACC_W - 1) - lead));
      e = ex - XW'((ACC_W - 1) - lead);
    end
  end
endmodule
