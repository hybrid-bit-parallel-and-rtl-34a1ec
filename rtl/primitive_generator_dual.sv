// primitive_generator_dual: dual-mode primitive generator (PG).
//
// Forms the cross-product primitives of two mantissas, prim[i][j] =
// a[i] & b[j], for i < a_len and j < b_len. The mantissas arrive from the
// separator with their implicit leading ones already in place, so those ones
// take part in the primitives like any other bit. Summing prim[i][j] with
// weight 2^(i+j) gives the mantissa product.
//
// PARALLEL = 1: all W x W primitives are formed at once and registered on the
// start edge; done pulses one cycle later.
// PARALLEL = 0: after start and one LOAD cycle (which clears the array) the
// controller forms one primitive per PROCESS cycle, row by row, so the
// latency from start to done is a_len * b_len + 2 cycles (2 if either length
// is 0). Primitives outside the active lengths stay 0 in both modes.
//
// Interface: start is a one-cycle pulse accepted while idle; prim is held from
// done until the next start. What the block computes follows the document;
// the row-by-row serial order and the register-then-done timing are this
// design's choices.
module primitive_generator_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  localparam int LW            = $clog2(REGISTER_WIDTH + 1) + 1
) (
  input  logic                                          clk,
  input  logic                                          reset,
  input  logic                                          start,
  input  logic [REGISTER_WIDTH-1:0]                     a_man,
  input  logic [REGISTER_WIDTH-1:0]                     b_man,
  input  logic [LW-1:0]                                 a_len,
  input  logic [LW-1:0]                                 b_len,
  output logic                                          done,
  output logic [REGISTER_WIDTH-1:0][REGISTER_WIDTH-1:0] prim
);
  localparam int W  = REGISTER_WIDTH;
  localparam int IW = (W > 1) ? $clog2(W) : 1;

  if (PARALLEL) begin : g_par
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done <= 1'b0;
        prim <= '0;
      end else begin
        done <= start;
        if (start)
          for (int i = 0; i < W; i++) prim[i] <= a_man[i] ? b_man : '0;
      end
    end
  end else begin : g_ser
    ser_state_t    state;
    logic [W-1:0]  a_q, b_q;
    logic [LW-1:0] a_len_q, b_len_q, i_q, j_q;

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state   <= S_IDLE;
        a_q     <= '0;
        b_q     <= '0;
        a_len_q <= '0;
        b_len_q <= '0;
        i_q     <= '0;
        j_q     <= '0;
        prim    <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            a_q     <= a_man;
            b_q     <= b_man;
            a_len_q <= a_len;
            b_len_q <= b_len;
            state   <= S_LOAD;
          end
          S_LOAD: begin
            prim  <= '0;
            i_q   <= '0;
            j_q   <= '0;
            state <= (a_len_q == '0 || b_len_q == '0) ? S_DONE : S_PROCESS;
          end
          S_PROCESS: begin
            prim[i_q[IW-1:0]][j_q[IW-1:0]] <=
              a_q[i_q[IW-1:0]] & b_q[j_q[IW-1:0]];
            if (j_q == b_len_q - 1'b1) begin
              j_q <= '0;
              i_q <= i_q + 1'b1;
              if (i_q == a_len_q - 1'b1) state <= S_DONE;
            end else begin
              j_q <= j_q + 1'b1;
            end
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("primitive_generator_dual: start while busy");
  end
endmodule
