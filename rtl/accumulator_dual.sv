// accumulator_dual: dual-mode accumulator (Accu).
//
// Adds the aligned, signed product (s_p, a_p) to the aligned partial sum
// (s_s, a_s), both sign-magnitude with ACC_W-bit magnitudes at the common
// exponent e_in. Equal signs add the magnitudes; different signs subtract
// a_s from a_p and, if the difference is negative, negate it and take s_s.
// A zero result is given sign 0. If the magnitude carries into bit ACC_W it
// is shifted right by one (dropping the LSB) and the exponent is incremented,
// so the stored partial sum always fits ACC_W bits:
// value = (-1)^s_out * m_out * 2^e_out.
//
// PARALLEL = 1: one (ACC_W+2)-bit addition registered on the start edge; done
// pulses one cycle later.
// PARALLEL = 0: a bit-serial ripple-carry adder over ACC_W + 2 bits, LSB
// first, the carry held in a flip-flop between cycles; latency from start to
// done is ACC_W + 4 cycles.
// In both modes the sign fix-up and the carry renormalization are decoded from
// the registered raw sum and the latched inputs, so the outputs are held from
// done until the next start.
//
// The ripple-carry serial form follows the document; the sign-magnitude
// partial-sum format and the carry renormalization are this design's choices.
module accumulator_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  parameter int ACC_W          = 24,
  localparam int XW            = exp_w(REGISTER_WIDTH)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  input  logic                 s_p,
  input  logic [ACC_W-1:0]     a_p,
  input  logic                 s_s,
  input  logic [ACC_W-1:0]     a_s,
  input  logic signed [XW-1:0] e_in,
  output logic                 done,
  output logic                 s_out,
  output logic [ACC_W-1:0]     m_out,
  output logic signed [XW-1:0] e_out
);
  localparam int RW = ACC_W + 2;

  logic                 s_p_q, s_s_q;
  logic signed [XW-1:0] e_q;
  logic [RW-1:0]        r_q;     // raw two's-complement sum or difference
  logic [RW-1:0]        mag;

  always_comb begin
    mag   = r_q;
    s_out = s_p_q;
    if (s_p_q != s_s_q && r_q[RW-1]) begin
      mag   = -r_q;
      s_out = s_s_q;
    end
    if (mag == '0) s_out = 1'b0;
    if (mag[ACC_W]) begin
      m_out = mag[ACC_W:1];
      e_out = e_q + 1'b1;
    end else begin
      m_out = mag[ACC_W-1:0];
      e_out = e_q;
    end
  end

  if (PARALLEL) begin : g_par
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done  <= 1'b0;
        s_p_q <= 1'b0;
        s_s_q <= 1'b0;
        e_q   <= '0;
        r_q   <= '0;
      end else begin
        done <= start;
        if (start) begin
          s_p_q <= s_p;
          s_s_q <= s_s;
          e_q   <= e_in;
          r_q   <= (s_p == s_s) ? RW'(a_p) + RW'(a_s) : RW'(a_p) - RW'(a_s);
        end
      end
    end
  end else begin : g_ser
    localparam int CW = $clog2(RW + 1);
    ser_state_t    state;
    logic [RW-1:0] x_sh, y_sh;
    logic          carry;
    logic [1:0]    bit_sum;
    logic [CW-1:0] n_q;

    assign bit_sum = 2'(x_sh[0]) + 2'(y_sh[0]) + 2'(carry);

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state <= S_IDLE;
        s_p_q <= 1'b0;
        s_s_q <= 1'b0;
        e_q   <= '0;
        r_q   <= '0;
        x_sh  <= '0;
        y_sh  <= '0;
        carry <= 1'b0;
        n_q   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            s_p_q <= s_p;
            s_s_q <= s_s;
            e_q   <= e_in;
            x_sh  <= RW'(a_p);
            y_sh  <= RW'(a_s);
            state <= S_LOAD;
          end
          S_LOAD: begin
            // Subtraction adds the one's complement with a carry-in of 1.
            if (s_p_q != s_s_q) y_sh <= ~y_sh;
            carry <= (s_p_q != s_s_q);
            r_q   <= '0;
            n_q   <= '0;
            state <= S_PROCESS;
          end
          S_PROCESS: begin
            r_q   <= {bit_sum[0], r_q[RW-1:1]};
            carry <= bit_sum[1];
            x_sh  <= x_sh >> 1;
            y_sh  <= y_sh >> 1;
            n_q   <= n_q + 1'b1;
            if (n_q == CW'(RW - 1)) state <= S_DONE;
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("accumulator_dual: start while busy");
  end
endmodule
