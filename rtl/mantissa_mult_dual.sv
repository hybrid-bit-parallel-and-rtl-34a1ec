// mantissa_mult_dual: dual-mode mantissa multiplier (Mul), the reduction
// stage of the flexible bit-precision multiplier.
//
// Reduces the column-organized primitives (col[i+j][i] = a[i] & b[j]) to the
// mantissa product a * b.
//
// PARALLEL = 1: the tree form. Each column's ones are counted and the counts
// are weighted and summed, product = sum over k of popcount(col[k]) * 2^k, in
// one combinational reduction (an adder tree after synthesis). Because the
// primitives of any pair of mantissa lengths land in the same columns, one
// network serves every precision. The product is registered on the start
// edge and done pulses one cycle later.
// PARALLEL = 0: a shift-and-add multiplier. On start the primitives are
// regrouped into rows, row j = {col[i+j][i]} = a & {b[j]}, which is the
// multiplicand gated by multiplier bit j. Each PROCESS cycle adds the
// current row at shift j and shifts the row store by one row, for the b_len
// bits of the weight mantissa, so the latency is b_len + 2 cycles (2 if
// either length is 0).
//
// Interface: start is a one-cycle pulse accepted while idle; product is held
// from done until the next start. The serial shift-and-add form, one
// multiplier bit per cycle, follows the document; the column-count form of
// the parallel reduction tree is this design's choice.
module mantissa_mult_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  localparam int LW            = $clog2(REGISTER_WIDTH + 1) + 1
) (
  input  logic                                            clk,
  input  logic                                            reset,
  input  logic                                            start,
  input  logic [2*REGISTER_WIDTH-2:0][REGISTER_WIDTH-1:0] col,
  input  logic [LW-1:0]                                   a_len,
  input  logic [LW-1:0]                                   b_len,
  output logic                                            done,
  output logic [2*REGISTER_WIDTH-1:0]                     product
);
  localparam int W  = REGISTER_WIDTH;
  localparam int PW = 2 * W;
  localparam int KW = $clog2(2 * W) + 1;

  // Number of ones in one column, widened to the product width.
  function automatic logic [PW-1:0] col_count(logic [W-1:0] c);
    logic [PW-1:0] n;
    n = '0;
    for (int i = 0; i < W; i++) n = n + PW'(c[i]);
    return n;
  endfunction

  if (PARALLEL) begin : g_par
    logic [PW-1:0] sum_d;

    always_comb begin
      sum_d = '0;
      for (int k = 0; k < 2 * W - 1; k++) sum_d = sum_d + (col_count(col[k]) << k);
    end

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done    <= 1'b0;
        product <= '0;
      end else begin
        done <= start;
        if (start) product <= sum_d;
      end
    end
  end else begin : g_ser
    ser_state_t         state;
    logic [W-1:0][W-1:0] row_q;   // row_q[0] is the row added next
    logic [W-1:0][W-1:0] rows;
    logic [KW-1:0]      j_q, n_rows;

    // Partial-product rows from the columns: rows[j][i] = col[i+j][i].
    always_comb begin
      for (int j = 0; j < W; j++)
        for (int i = 0; i < W; i++) rows[j][i] = col[i+j][i];
    end

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state   <= S_IDLE;
        row_q   <= '0;
        j_q     <= '0;
        n_rows  <= '0;
        product <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            row_q  <= rows;
            n_rows <= (a_len == '0 || b_len == '0) ? '0 : KW'(b_len);
            state  <= S_LOAD;
          end
          S_LOAD: begin
            product <= '0;
            j_q     <= '0;
            state   <= (n_rows == '0) ? S_DONE : S_PROCESS;
          end
          S_PROCESS: begin
            // Conditional addition: the row is zero when b[j] is zero.
            product <= product + (PW'(row_q[0]) << j_q);
            row_q   <= row_q >> W;
            j_q     <= j_q + 1'b1;
            if (j_q == n_rows - 1'b1) state <= S_DONE;
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("mantissa_mult_dual: start while busy");
  end
endmodule
