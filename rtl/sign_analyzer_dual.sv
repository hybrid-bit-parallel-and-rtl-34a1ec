// sign_analyzer_dual: dual-mode sign analyzer (SA).
//
// Produces the sign of the product of an activation and a weight, the XOR of
// their sign bits. With PARALLEL = 1 the result is registered on the start
// edge and done pulses in the next cycle. With PARALLEL = 0 a small
// IDLE/LOAD/PROCESS/DONE controller latches the two sign bits on start,
// handles the single sign bit in one PROCESS cycle and pulses done, so the
// latency from start to done is 3 cycles (N + 2 with N = 1 bit).
//
// Interface: start is a one-cycle pulse, accepted only while idle; sign_out is
// held from done until the next start. The dual-mode wrapper with a
// compile-time PARALLEL flag and the four controller states follow the
// document; registering the parallel result for one cycle is this design's
// choice so that both modes share the same handshake.
module sign_analyzer_dual
  import hybrid_pkg::*;
#(
  parameter bit PARALLEL = 1'b1
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  input  logic sign_act,
  input  logic sign_wt,
  output logic done,
  output logic sign_out
);
  if (PARALLEL) begin : g_par
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        done     <= 1'b0;
        sign_out <= 1'b0;
      end else begin
        done <= start;
        if (start) sign_out <= sign_act ^ sign_wt;
      end
    end
  end else begin : g_ser
    ser_state_t state;
    logic       a_q, b_q;

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state    <= S_IDLE;
        a_q      <= 1'b0;
        b_q      <= 1'b0;
        sign_out <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            a_q   <= sign_act;
            b_q   <= sign_wt;
            state <= S_LOAD;
          end
          S_LOAD: begin
            sign_out <= 1'b0;
            state    <= S_PROCESS;
          end
          S_PROCESS: begin
            sign_out <= a_q ^ b_q;
            state    <= S_DONE;
          end
          S_DONE: state <= S_IDLE;
        endcase
      end
    end
    assign done = (state == S_DONE);

    a_start_idle: assert property (@(posedge clk) disable iff (reset)
                                   start |-> state == S_IDLE)
      else $error("sign_analyzer_dual: start while busy");
  end
endmodule
