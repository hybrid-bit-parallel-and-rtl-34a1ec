// concat_shift_tree_dual: dual-mode concatenation-shift tree (CST).
//
// Aligns the product mantissa m_p and the partial-sum mantissa m_s to the
// common exponent chosen by the exponent normalizer by shifting each right by
// its shift amount (sh_p, sh_s, at most ACC_W). Bits shifted out below the
// LSB are dropped (truncation toward zero).
//
// PARALLEL = 1: a logarithmic shifter tree, one stage per bit of the shift
// amount, each stage passing every bit either straight down or from its
// neighbour 2^k positions to the left; the result is registered on the start
// edge and done pulses one cycle later.
// PARALLEL = 0: the shift is serialized to one position per PROCESS cycle,
// each bit taking its left neighbour's value, first for the product and then
// for the partial sum; latency from start to done is sh_p + sh_s + 2 cycles.
//
// Interface: start is a one-cycle pulse accepted while idle; a_p and a_s are
// held from done until the next start. Serializing the shift with
// neighbour-to-neighbour links follows the document; using the tree for the
// alignment shift only is this design's choice.
module concat_shift_tree_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL = 1'b1,
  parameter int ACC_W    = 24,
  localparam int SW      = $clog2(ACC_W + 1)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [ACC_W-1:0] m_p,
  input  logic [SW-1:0]    sh_p,
  input  logic [ACC_W-1:0] m_s,
  input  logic [SW-1:0]    sh_s,
  output logic             done,
  output logic [ACC_W-1:0] a_p,
  output logic [ACC_W-1:0] a_s
);
  if (PARALLEL) begin : g_par
    // One shifter tree stage per bit of the shift amount.
    function automatic logic [ACC_W-1:0] tree_shift(logic [ACC_W-1:0] x,
                                                     logic [SW-1:0] sh);
      logic [ACC_W-1:0] y;
      y = x;
      for (int k = 0; k < SW; k++)
        if (sh[k]) y = ((1 << k) >= ACC_W) ? '0 : (y >> (1 << k));
      return y;
    endfunction

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done <= 1'b0;
        a_p  <= '0;
        a_s  <= '0;
      end else begin
        done <= start;
        if (start) begin
          a_p <= tree_shift(m_p, sh_p);
          a_s <= tree_shift(m_s, sh_s);
        end
      end
    end
  end else begin : g_ser
    ser_state_t  state;
    logic [SW-1:0] cnt_p, cnt_s;

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state <= S_IDLE;
        cnt_p <= '0;
        cnt_s <= '0;
        a_p   <= '0;
        a_s   <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            a_p   <= m_p;
            a_s   <= m_s;
            cnt_p <= sh_p;
            cnt_s <= sh_s;
            state <= S_LOAD;
          end
          S_LOAD: state <= (cnt_p == '0 && cnt_s == '0) ? S_DONE : S_PROCESS;
          S_PROCESS: begin
            if (cnt_p != '0) begin
              a_p   <= {1'b0, a_p[ACC_W-1:1]};
              cnt_p <= cnt_p - 1'b1;
              if (cnt_p == SW'(1) && cnt_s == '0) state <= S_DONE;
            end else begin
              a_s   <= {1'b0, a_s[ACC_W-1:1]};
              cnt_s <= cnt_s - 1'b1;
              if (cnt_s == SW'(1)) state <= S_DONE;
            end
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("concat_shift_tree_dual: start while busy");
  end
endmodule
