// exponent_normalizer_dual: dual-mode exponent normalizer (EN).
//
// Brings the new product and the stored partial sum to a common exponent
// before they are added. It forms d = e_p - e_s; the larger exponent becomes
// e_max and the operand with the smaller exponent gets a right shift of |d|,
// saturated at ACC_W (a shift of ACC_W clears an ACC_W-bit mantissa). A zero
// operand (z_p or z_s) never sets the exponent: the other operand's exponent
// is taken and no shift is requested.
//
// PARALLEL = 1: d is a single XW+1-bit subtraction registered on the start
// edge; done pulses one cycle later.
// PARALLEL = 0: d is formed by a bit-serial ripple-borrow subtractor
// (e_p + ~e_s + 1), one bit per PROCESS cycle, LSB first, over XW + 1 bits;
// latency from start to done is XW + 3 cycles.
// In both modes the outputs are decoded from the registered difference and
// the latched inputs, so they are held from done until the next start.
//
// The block's place (between mantissa truncation and the concat-shift tree,
// with the partial sum fed back from the output buffer) follows the PE
// diagram; that it performs the exponent comparison for alignment is this
// design's reading of "normalizes exponent results".
module exponent_normalizer_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  parameter int ACC_W          = 24,
  localparam int XW            = exp_w(REGISTER_WIDTH),
  localparam int SW            = $clog2(ACC_W + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  input  logic signed [XW-1:0] e_p,
  input  logic                 z_p,
  input  logic signed [XW-1:0] e_s,
  input  logic                 z_s,
  output logic                 done,
  output logic signed [XW-1:0] e_max,
  output logic        [SW-1:0] sh_p,
  output logic        [SW-1:0] sh_s
);
  localparam int DW = XW + 1;

  logic signed [XW-1:0] e_p_q, e_s_q;
  logic                 z_p_q, z_s_q;
  logic signed [DW-1:0] d_q;

  // Shift amount for a non-negative difference, saturated at ACC_W.
  function automatic logic [SW-1:0] sat_shift(logic signed [DW-1:0] d);
    return (d >= DW'(ACC_W)) ? SW'(ACC_W) : SW'(d);
  endfunction

  always_comb begin
    e_max = e_p_q;
    sh_p  = '0;
    sh_s  = '0;
    if (z_p_q) begin
      e_max = e_s_q;
    end else if (!z_s_q) begin
      if (d_q < 0) begin
        e_max = e_s_q;
        sh_p  = sat_shift(-d_q);
      end else begin
        sh_s  = sat_shift(d_q);
      end
    end
  end

  if (PARALLEL) begin : g_par
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done  <= 1'b0;
        e_p_q <= '0;
        e_s_q <= '0;
        z_p_q <= 1'b1;
        z_s_q <= 1'b1;
        d_q   <= '0;
      end else begin
        done <= start;
        if (start) begin
          e_p_q <= e_p;
          e_s_q <= e_s;
          z_p_q <= z_p;
          z_s_q <= z_s;
          d_q   <= DW'(e_p) - DW'(e_s);
        end
      end
    end
  end else begin : g_ser
    localparam int CW = $clog2(DW + 1);
    ser_state_t    state;
    logic [DW-1:0] a_sh, b_sh;
    logic          carry;
    logic [1:0]    bit_sum;
    logic [CW-1:0] n_q;
    logic          b_inv;

    assign b_inv   = ~b_sh[0];
    assign bit_sum = 2'(a_sh[0]) + 2'(b_inv) + 2'(carry);

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state <= S_IDLE;
        e_p_q <= '0;
        e_s_q <= '0;
        z_p_q <= 1'b1;
        z_s_q <= 1'b1;
        d_q   <= '0;
        a_sh  <= '0;
        b_sh  <= '0;
        carry <= 1'b0;
        n_q   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            e_p_q <= e_p;
            e_s_q <= e_s;
            z_p_q <= z_p;
            z_s_q <= z_s;
            state <= S_LOAD;
          end
          S_LOAD: begin
            a_sh  <= DW'(e_p_q);
            b_sh  <= DW'(e_s_q);
            carry <= 1'b1;
            n_q   <= '0;
            d_q   <= '0;
            state <= S_PROCESS;
          end
          S_PROCESS: begin
            d_q   <= {bit_sum[0], d_q[DW-1:1]};
            carry <= bit_sum[1];
            a_sh  <= a_sh >> 1;
            b_sh  <= b_sh >> 1;
            n_q   <= n_q + 1'b1;
            if (n_q == CW'(DW - 1)) state <= S_DONE;
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("exponent_normalizer_dual: start while busy");
  end
endmodule
