// exponent_adder_dual: dual-mode flexible-bit exponent adder (Add).
//
// Adds the two effective biased exponents and a signed offset that removes
// both biases and both fraction lengths (hybrid_pkg::exp_offset), so that
// sum is the binary exponent of the raw mantissa product:
// product value = mantissa_product * 2^sum. The result is a signed
// XW-bit number, XW = REGISTER_WIDTH + 6.
//
// PARALLEL = 1: one XW-bit three-input addition, registered on the start
// edge; done pulses one cycle later.
// PARALLEL = 0: a bit-serial ripple-carry adder. The operands are latched on
// start, then one PROCESS cycle per bit, LSB first, adds the three operand
// bits and the carry kept from the previous cycle (two bits, since three
// operands are added). Latency from start to done is XW + 2 cycles.
//
// Interface: start is a one-cycle pulse accepted while idle; sum is held from
// done until the next start. The serial ripple-carry form follows the
// document; folding the bias into a third operand is this design's choice.
module exponent_adder_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  localparam int XW            = exp_w(REGISTER_WIDTH)
) (
  input  logic                             clk,
  input  logic                             reset,
  input  logic                             start,
  input  logic        [REGISTER_WIDTH-1:0] exp_a,
  input  logic        [REGISTER_WIDTH-1:0] exp_b,
  input  logic signed [XW-1:0]             offset,
  output logic                             done,
  output logic signed [XW-1:0]             sum
);
  localparam int CW = $clog2(XW + 1);

  if (PARALLEL) begin : g_par
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done <= 1'b0;
        sum  <= '0;
      end else begin
        done <= start;
        if (start) sum <= $signed(XW'(exp_a)) + $signed(XW'(exp_b)) + offset;
      end
    end
  end else begin : g_ser
    ser_state_t    state;
    logic [XW-1:0] a_q, b_q, c_q;
    logic [1:0]    carry;
    logic [2:0]    bit_sum;
    logic [CW-1:0] n_q;

    assign bit_sum = 3'(a_q[0]) + 3'(b_q[0]) + 3'(c_q[0]) + 3'(carry);

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state <= S_IDLE;
        a_q   <= '0;
        b_q   <= '0;
        c_q   <= '0;
        carry <= '0;
        n_q   <= '0;
        sum   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            a_q   <= XW'(exp_a);
            b_q   <= XW'(exp_b);
            c_q   <= offset;
            state <= S_LOAD;
          end
          S_LOAD: begin
            carry <= '0;
            n_q   <= '0;
            sum   <= '0;
            state <= S_PROCESS;
          end
          S_PROCESS: begin
            sum   <= {bit_sum[0], sum[XW-1:1]};
            carry <= bit_sum[2:1];
            a_q   <= a_q >> 1;
            b_q   <= b_q >> 1;
            c_q   <= c_q >> 1;
            n_q   <= n_q + 1'b1;
            if (n_q == CW'(XW - 1)) state <= S_DONE;
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("exponent_adder_dual: start while busy");
  end
endmodule
