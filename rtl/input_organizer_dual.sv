// input_organizer_dual: dual-mode input organizer (IOrg).
//
// Sorts the cross-product primitives by bit index so that the reduction tree
// can treat each bit position as one column: col[k][i] = prim[i][k-i] for
// 0 <= k-i < W, and 0 elsewhere. Column k then holds every primitive of
// weight 2^k, indexed by the activation-mantissa bit it came from. The
// W*(W-1) entries outside that range are constant 0; they keep the column
// array rectangular and disappear in synthesis.
//
// PARALLEL = 1: the rearrangement is pure wiring; the organized columns are
// registered on the start edge and done pulses one cycle later.
// PARALLEL = 0: after start and one LOAD cycle (which clears the columns) one
// primitive is moved per PROCESS cycle, in the same row-by-row order as the
// serial primitive generator, so the latency is a_len * b_len + 2 cycles.
//
// Interface: start is a one-cycle pulse accepted while idle; col is held from
// done until the next start. The block's role (align primitives by bit index
// for the reduction tree) follows the document; the column layout is this
// design's choice.
module input_organizer_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL       = 1'b1,
  parameter int REGISTER_WIDTH = 16,
  localparam int LW            = $clog2(REGISTER_WIDTH + 1) + 1
) (
  input  logic                                            clk,
  input  logic                                            reset,
  input  logic                                            start,
  input  logic [REGISTER_WIDTH-1:0][REGISTER_WIDTH-1:0]   prim,
  input  logic [LW-1:0]                                   a_len,
  input  logic [LW-1:0]                                   b_len,
  output logic                                            done,
  output logic [2*REGISTER_WIDTH-2:0][REGISTER_WIDTH-1:0] col
);
  localparam int W  = REGISTER_WIDTH;
  localparam int IW = (W > 1) ? $clog2(W) : 1;
  localparam int KW = $clog2(2 * W);

  if (PARALLEL) begin : g_par
    logic [2*W-2:0][W-1:0] col_d;

    always_comb begin
      col_d = '0;
      for (int i = 0; i < W; i++)
        for (int j = 0; j < W; j++)
          col_d[i+j][i] = prim[i][j];
    end

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done <= 1'b0;
        col  <= '0;
      end else begin
        done <= start;
        if (start) col <= col_d;
      end
    end
  end else begin : g_ser
    ser_state_t            state;
    logic [W-1:0][W-1:0]   prim_q;
    logic [LW-1:0]         a_len_q, b_len_q, i_q, j_q;
    logic [KW-1:0]         k;

    assign k = KW'(i_q) + KW'(j_q);

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state   <= S_IDLE;
        prim_q  <= '0;
        a_len_q <= '0;
        b_len_q <= '0;
        i_q     <= '0;
        j_q     <= '0;
        col     <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            prim_q  <= prim;
            a_len_q <= a_len;
            b_len_q <= b_len;
            state   <= S_LOAD;
          end
          S_LOAD: begin
            col   <= '0;
            i_q   <= '0;
            j_q   <= '0;
            state <= (a_len_q == '0 || b_len_q == '0) ? S_DONE : S_PROCESS;
          end
          S_PROCESS: begin
            col[k][i_q[IW-1:0]] <= prim_q[i_q[IW-1:0]][j_q[IW-1:0]];
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
      else $error("input_organizer_dual: start while busy");
  end
endmodule
