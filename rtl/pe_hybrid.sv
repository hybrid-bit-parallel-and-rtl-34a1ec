// pe_hybrid: hybrid bit-parallel / bit-serial flexible-precision processing
// element.
//
// The PE computes dot products of activations and weights in a run-time
// selectable number format (any float with 1..W-1 exponent bits, or a signed
// or unsigned integer, see hybrid_pkg) and accumulates them into partial sums
// kept in an extended sign / exponent / ACC_W-bit-magnitude format. Each
// product goes through eight dual-mode sub-blocks, and the compile-time
// CONFIG vector builds each one either bit-parallel (one cycle) or bit-serial
// (one bit, primitive or column per cycle):
//
//   buffers -> separator -> SA  (sign)                 \
//                        -> PG -> IOrg -> Mul (mantissa) -> truncation
//                        -> Add (exponent)             /        |
//   partial sum (buffer) -----------------------------> EN -> CST -> Accu
//                                                                    |
//   partial-sum buffer <---------------------------------------------+
//
// CONFIG bit order is {Mul, Add, Accu, CST, EN, IOrg, PG, SA} (bit 7..0),
// 1 = parallel, 0 = serial; the default 8'b1010_0000 has a parallel
// multiplier and accumulator and everything else serial.
//
// Operation: write operands into the activation and weight buffers, present
// the formats, op_len, op_psum_addr and op_clear, and pulse read_data for one
// cycle while busy is low. For i = 0 .. op_len-1 the PE multiplies
// activation i by weight i and adds the product into partial-sum entry
// op_psum_addr (starting from zero when op_clear is set); done_r pulses for
// one cycle when the last partial sum has been written. read_data while busy
// is ignored. A controller starts SA, PG and Add together, waits for all three,
// then runs IOrg, Mul, EN, CST and Accu one after the other with start/done
// handshakes, and writes the accumulator result back. With every block
// parallel one product takes 13 cycles; each serial block adds its own loop
// count (see the sub-blocks' headers). done_r follows read_data after the
// sum of the per-product cycle counts plus one.
//
// The sub-block list, their order and connections, the dual-mode flag, the
// 8-bit configuration vector and the read_data / done_r names follow the
// document. The buffer sizes, partial-sum format, number formats, the
// placement of the input organizer between PG and Mul, and the sequencing are
// this design's choices.
module pe_hybrid
  import hybrid_pkg::*;
#(
  parameter int       REGISTER_WIDTH = 16,
  parameter int       ACC_W          = 24,
  parameter bit [7:0] CONFIG         = 8'b1010_0000,
  parameter int       BUF_DEPTH      = 16,
  parameter int       PSUM_DEPTH     = 16,
  localparam int      XW             = exp_w(REGISTER_WIDTH),
  localparam int      BAW            = (BUF_DEPTH > 1) ? $clog2(BUF_DEPTH) : 1,
  localparam int      PAW            = (PSUM_DEPTH > 1) ? $clog2(PSUM_DEPTH) : 1,
  localparam int      NW             = $clog2(BUF_DEPTH + 1)
) (
  input  logic                      clk,
  input  logic                      reset,
  // activation and weight buffer write ports
  input  logic                      act_we,
  input  logic [BAW-1:0]            act_waddr,
  input  logic [REGISTER_WIDTH-1:0] act_wdata,
  input  logic                      wt_we,
  input  logic [BAW-1:0]            wt_waddr,
  input  logic [REGISTER_WIDTH-1:0] wt_wdata,
  // operation
  input  fmt_t                      fmt_act,
  input  fmt_t                      fmt_wt,
  input  logic                      read_data,
  input  logic [NW-1:0]             op_len,
  input  logic [PAW-1:0]            op_psum_addr,
  input  logic                      op_clear,
  output logic                      busy,
  output logic                      done_r,
  // partial-sum read port
  input  logic [PAW-1:0]            psum_raddr,
  output logic                      psum_rsign,
  output logic signed [XW-1:0]      psum_rexp,
  output logic [ACC_W-1:0]          psum_rman
);
  localparam int W  = REGISTER_WIDTH;
  localparam int LW = $clog2(W + 1) + 1;
  localparam int SW = $clog2(ACC_W + 1);

  typedef enum logic [3:0] {
    T_IDLE, T_FRONT_GO, T_FRONT_WAIT, T_ORG_GO, T_ORG_WAIT, T_MUL_GO,
    T_MUL_WAIT, T_EN_GO, T_EN_WAIT, T_CST_GO, T_CST_WAIT, T_ACC_GO,
    T_ACC_WAIT, T_WB, T_DONE
  } ctrl_state_t;

  ctrl_state_t    state;
  fmt_t           fmt_act_q, fmt_wt_q;
  logic [NW-1:0]  len_q, idx_q;
  logic [PAW-1:0] addr_q;
  logic           clear_q;
  logic           sa_ok, pg_ok, add_ok;

  // ---------------------------------------------------------------- buffers
  logic [W-1:0] act_word, wt_word;

  operand_buffer #(.WIDTH(W), .DEPTH(BUF_DEPTH)) u_act_buf (
    .clk, .we(act_we), .waddr(act_waddr), .wdata(act_wdata),
    .raddr(BAW'(idx_q)), .rdata(act_word));

  operand_buffer #(.WIDTH(W), .DEPTH(BUF_DEPTH)) u_wt_buf (
    .clk, .we(wt_we), .waddr(wt_waddr), .wdata(wt_wdata),
    .raddr(BAW'(idx_q)), .rdata(wt_word));

  // --------------------------------------------------------------- separator
  logic          sign_a, sign_b;
  logic [W-1:0]  exp_a, exp_b, man_a, man_b;
  logic [LW-1:0] len_a, len_b;

  sem_separator #(.REGISTER_WIDTH(W)) u_sep_act (
    .word(act_word), .fmt(fmt_act_q), .sign(sign_a), .exp(exp_a), .man(man_a),
    .man_len(len_a));

  sem_separator #(.REGISTER_WIDTH(W)) u_sep_wt (
    .word(wt_word), .fmt(fmt_wt_q), .sign(sign_b), .exp(exp_b), .man(man_b),
    .man_len(len_b));

  // ------------------------------------------------------------ multiplication
  logic                 sa_start, pg_start, add_start, org_start, mul_start;
  logic                 sa_done, pg_done, add_done, org_done, mul_done;
  logic                 sign_p;
  logic [W-1:0][W-1:0]  prim;
  logic [2*W-2:0][W-1:0] col;
  logic [2*W-1:0]       product;
  logic signed [XW-1:0] ex_sum;

  assign sa_start  = (state == T_FRONT_GO);
  assign pg_start  = (state == T_FRONT_GO);
  assign add_start = (state == T_FRONT_GO);
  assign org_start = (state == T_ORG_GO);
  assign mul_start = (state == T_MUL_GO);

  sign_analyzer_dual #(.PARALLEL(CONFIG[CFG_SA])) u_sa (
    .clk, .reset, .start(sa_start), .sign_act(sign_a), .sign_wt(sign_b),
    .done(sa_done), .sign_out(sign_p));

  primitive_generator_dual #(.PARALLEL(CONFIG[CFG_PG]), .REGISTER_WIDTH(W)) u_pg (
    .clk, .reset, .start(pg_start), .a_man(man_a), .b_man(man_b),
    .a_len(len_a), .b_len(len_b), .done(pg_done), .prim);

  exponent_adder_dual #(.PARALLEL(CONFIG[CFG_ADD]), .REGISTER_WIDTH(W)) u_add (
    .clk, .reset, .start(add_start), .exp_a, .exp_b,
    .offset(XW'(exp_offset(fmt_act_q, fmt_wt_q))), .done(add_done), .sum(ex_sum));

  input_organizer_dual #(.PARALLEL(CONFIG[CFG_IORG]), .REGISTER_WIDTH(W)) u_iorg (
    .clk, .reset, .start(org_start), .prim, .a_len(len_a), .b_len(len_b),
    .done(org_done), .col);

  mantissa_mult_dual #(.PARALLEL(CONFIG[CFG_MUL]), .REGISTER_WIDTH(W)) u_mul (
    .clk, .reset, .start(mul_start), .col, .a_len(len_a), .b_len(len_b),
    .done(mul_done), .product);

  logic                 t_sign, t_zero;
  logic [ACC_W-1:0]     t_man;
  logic signed [XW-1:0] t_exp;

  mantissa_truncation #(.REGISTER_WIDTH(W), .ACC_W(ACC_W)) u_trunc (
    .sign_in(sign_p), .ex(ex_sum), .product, .sign(t_sign), .m(t_man),
    .e(t_exp), .zero(t_zero));

  // -------------------------------------------------------------- accumulation
  logic                 en_start, cst_start, acc_start;
  logic                 en_done, cst_done, acc_done;
  logic                 buf_sign, s_sign;
  logic signed [XW-1:0] buf_exp, s_exp, e_max, acc_exp;
  logic [ACC_W-1:0]     buf_man, s_man, al_p, al_s, acc_man;
  logic [SW-1:0]        sh_p, sh_s;
  logic                 acc_sign, use_zero;

  assign en_start  = (state == T_EN_GO);
  assign cst_start = (state == T_CST_GO);
  assign acc_start = (state == T_ACC_GO);

  // The first product of a cleared operation starts from a zero partial sum.
  assign use_zero = clear_q && (idx_q == '0);
  assign s_sign   = use_zero ? 1'b0 : buf_sign;
  assign s_exp    = use_zero ? '0   : buf_exp;
  assign s_man    = use_zero ? '0   : buf_man;

  exponent_normalizer_dual #(.PARALLEL(CONFIG[CFG_EN]), .REGISTER_WIDTH(W),
                             .ACC_W(ACC_W)) u_en (
    .clk, .reset, .start(en_start), .e_p(t_exp), .z_p(t_zero), .e_s(s_exp),
    .z_s(s_man == '0), .done(en_done), .e_max, .sh_p, .sh_s);

  concat_shift_tree_dual #(.PARALLEL(CONFIG[CFG_CST]), .ACC_W(ACC_W)) u_cst (
    .clk, .reset, .start(cst_start), .m_p(t_man), .sh_p, .m_s(s_man), .sh_s,
    .done(cst_done), .a_p(al_p), .a_s(al_s));

  accumulator_dual #(.PARALLEL(CONFIG[CFG_ACCU]), .REGISTER_WIDTH(W),
                     .ACC_W(ACC_W)) u_accu (
    .clk, .reset, .start(acc_start), .s_p(t_sign), .a_p(al_p), .s_s(s_sign),
    .a_s(al_s), .e_in(e_max), .done(acc_done), .s_out(acc_sign),
    .m_out(acc_man), .e_out(acc_exp));

  psum_buffer #(.REGISTER_WIDTH(W), .ACC_W(ACC_W), .DEPTH(PSUM_DEPTH)) u_psum (
    .clk, .reset, .we(state == T_WB), .waddr(addr_q), .wsign(acc_sign),
    .wexp(acc_exp), .wman(acc_man), .raddr(addr_q), .rsign(buf_sign),
    .rexp(buf_exp), .rman(buf_man), .host_raddr(psum_raddr),
    .host_rsign(psum_rsign), .host_rexp(psum_rexp), .host_rman(psum_rman));

  // --------------------------------------------------------------- controller
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= T_IDLE;
      fmt_act_q <= '0;
      fmt_wt_q  <= '0;
      len_q     <= '0;
      idx_q     <= '0;
      addr_q    <= '0;
      clear_q   <= 1'b0;
      sa_ok     <= 1'b0;
      pg_ok     <= 1'b0;
      add_ok    <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE: if (read_data) begin
          fmt_act_q <= fmt_act;
          fmt_wt_q  <= fmt_wt;
          len_q     <= op_len;
          addr_q    <= op_psum_addr;
          clear_q   <= op_clear;
          idx_q     <= '0;
          state     <= (op_len == '0) ? T_DONE : T_FRONT_GO;
        end
        T_FRONT_GO: begin
          sa_ok  <= 1'b0;
          pg_ok  <= 1'b0;
          add_ok <= 1'b0;
          state  <= T_FRONT_WAIT;
        end
        T_FRONT_WAIT: begin
          if (sa_done)  sa_ok  <= 1'b1;
          if (pg_done)  pg_ok  <= 1'b1;
          if (add_done) add_ok <= 1'b1;
          if ((sa_ok || sa_done) && (pg_ok || pg_done) && (add_ok || add_done))
            state <= T_ORG_GO;
        end
        T_ORG_GO:   state <= T_ORG_WAIT;
        T_ORG_WAIT: if (org_done) state <= T_MUL_GO;
        T_MUL_GO:   state <= T_MUL_WAIT;
        T_MUL_WAIT: if (mul_done) state <= T_EN_GO;
        T_EN_GO:    state <= T_EN_WAIT;
        T_EN_WAIT:  if (en_done) state <= T_CST_GO;
        T_CST_GO:   state <= T_CST_WAIT;
        T_CST_WAIT: if (cst_done) state <= T_ACC_GO;
        T_ACC_GO:   state <= T_ACC_WAIT;
        T_ACC_WAIT: if (acc_done) state <= T_WB;
        T_WB: begin
          idx_q <= idx_q + 1'b1;
          state <= (idx_q + 1'b1 == len_q) ? T_DONE : T_FRONT_GO;
        end
        T_DONE: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy   = (state != T_IDLE);
  assign done_r = (state == T_DONE);

  a_len_fits: assert property (@(posedge clk) disable iff (reset)
                               (state == T_IDLE && read_data) |-> op_len <= NW'(BUF_DEPTH))
    else $error("pe_hybrid: op_len exceeds the buffer depth");
endmodule
