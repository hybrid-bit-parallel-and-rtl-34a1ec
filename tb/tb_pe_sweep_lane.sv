// tb_pe_sweep_lane: one lane of the width / configuration sweep testbench.
//
// Holds one pe_hybrid built with operand width W and configuration CONFIG,
// and drives it with NOPS dot products of random length (1..BD) in random
// number formats that fit W bits: unsigned or sign-magnitude integers and
// floats with 1..8 exponent bits and any remaining mantissa bits (also none),
// with activation and weight formats chosen independently. Every result is
// compared bit for bit with the reference model (tb_ref_pkg) and, as a real
// number, with the exact dot product within the truncation error; the number
// of cycles from read_data to done_r is compared with the sum of the
// sub-blocks' latencies (1 for a parallel block, the serial loop count
// otherwise). The lane raises fin when its last operation has been checked
// and reports its check and failure counts to the enclosing testbench.
module tb_pe_sweep_lane
  import hybrid_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int       W      = 8,
  parameter bit [7:0] CONFIG = 8'b1010_0000,
  parameter int       NOPS   = 6
) (
  input  logic clk,
  input  logic reset,
  output int   checks,
  output int   failures,
  output logic fin
);
  localparam int ACC_W = 24, XW = W + 6, BD = 16, PD = 16;

  logic act_we, wt_we, read_data, op_clear;
  logic [3:0] act_waddr, wt_waddr, op_psum_addr, psum_raddr;
  logic [W-1:0] act_wdata, wt_wdata;
  logic [4:0] op_len;
  fmt_t fmt_act, fmt_wt;
  logic busy, done_r, rsign;
  logic signed [XW-1:0] rexp;
  logic [ACC_W-1:0] rman;

  pe_hybrid #(.REGISTER_WIDTH(W), .CONFIG(CONFIG)) u_pe (
    .clk, .reset, .act_we, .act_waddr, .act_wdata, .wt_we, .wt_waddr, .wt_wdata,
    .fmt_act, .fmt_wt, .read_data, .op_len, .op_psum_addr, .op_clear,
    .busy, .done_r, .psum_raddr, .psum_rsign(rsign), .psum_rexp(rexp), .psum_rman(rman));

  ref_psum_t model [PD];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: W=%0d cfg %b: %s", W, CONFIG, what);
    end
  endtask

  // A random format of at most W bits.
  function automatic fmt_t rand_fmt();
    int n, s, e, m;
    n = $urandom_range(W, 1);
    if (n >= 2 && $urandom_range(2, 0) != 0) begin
      s = (n >= 3) ? int'($urandom_range(1, 0)) : 0;
      e = $urandom_range(((n - s) < 8) ? n - s : 8, 1);
      m = n - s - e;
    end else begin
      s = (n >= 2) ? int'($urandom_range(1, 0)) : 0;
      e = 0;
      m = n - s;
    end
    return '{sign_en: 1'(s), exp_bits: 6'(e), man_bits: 6'(m)};
  endfunction

  function automatic logic [W-1:0] rand_word(fmt_t f);
    int n;
    logic [31:0] r;
    n = int'(f.sign_en) + int'(f.exp_bits) + int'(f.man_bits);
    r = $urandom & ~(32'hFFFF_FFFF << n);
    return W'(r);
  endfunction

  function automatic int blk_lat(bit par, int serial_lat);
    return par ? 1 : serial_lat;
  endfunction

  function automatic int elem_cycles(ref_info_t i);
    int sa, pg, add, org, mul, en, cst, acc, front, nz;
    nz  = (i.la != 0 && i.lb != 0);
    sa  = blk_lat(CONFIG[CFG_SA], 3);
    pg  = blk_lat(CONFIG[CFG_PG], i.la * i.lb + 2);
    add = blk_lat(CONFIG[CFG_ADD], XW + 2);
    org = blk_lat(CONFIG[CFG_IORG], i.la * i.lb + 2);
    mul = blk_lat(CONFIG[CFG_MUL], nz ? i.lb + 2 : 2);
    en  = blk_lat(CONFIG[CFG_EN], XW + 3);
    cst = blk_lat(CONFIG[CFG_CST], i.sh_p + i.sh_s + 2);
    acc = blk_lat(CONFIG[CFG_ACCU], ACC_W + 4);
    front = (sa > pg) ? sa : pg;
    front = (front > add) ? front : add;
    return 1 + front + (1 + org) + (1 + mul) + (1 + en) + (1 + cst) + (1 + acc) + 1;
  endfunction

  task automatic run_op(int len, int addr, bit clear);
    fmt_t fa, fw;
    logic [W-1:0] aw [BD], ww [BD];
    ref_psum_t ps;
    ref_info_t info;
    int exp_cyc, cyc;
    real exact, absum, got, err;

    fa = rand_fmt();
    fw = rand_fmt();
    for (int i = 0; i < len; i++) begin
      aw[i] = rand_word(fa);
      ww[i] = rand_word(fw);
      @(negedge clk);
      act_we = 1; act_waddr = 4'(i); act_wdata = aw[i];
      wt_we = 1; wt_waddr = 4'(i); wt_wdata = ww[i];
    end
    @(negedge clk);
    act_we = 0; wt_we = 0;

    ps = clear ? ref_psum_t'{s: 0, e: 0, m: 0} : model[addr];
    exact = psum_value(ps.s, ps.e, ps.m);
    absum = (exact < 0) ? -exact : exact;
    exp_cyc = 1;
    for (int i = 0; i < len; i++) begin
      real pv;
      ps = mac_step(ps, 64'(aw[i]), 64'(ww[i]), fa, fw, ACC_W, info);
      pv = word_value(64'(aw[i]), fa) * word_value(64'(ww[i]), fw);
      exact += pv;
      absum += (pv < 0) ? -pv : pv;
      exp_cyc += elem_cycles(info);
    end
    model[addr] = ps;

    @(negedge clk);
    fmt_act = fa; fmt_wt = fw; op_len = 5'(len); op_psum_addr = 4'(addr); op_clear = clear;
    read_data = 1;
    @(negedge clk);
    read_data = 0;
    cyc = 1;
    while (!done_r && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    psum_raddr = 4'(addr);
    #1;
    check(cyc == exp_cyc, $sformatf("%0d cycles, expected %0d (len %0d)", cyc, exp_cyc, len));
    check(rsign == ps.s && int'(rexp) == ps.e && 64'(rman) == ps.m,
          $sformatf("psum s=%0d e=%0d m=%0h, model s=%0d e=%0d m=%0h",
                    rsign, rexp, rman, ps.s, ps.e, ps.m));
    got = psum_value(rsign, int'(rexp), 64'(rman));
    err = got - exact;
    if (err < 0) err = -err;
    check(err <= absum * (2.0 ** (-(ACC_W - 6))),
          $sformatf("value %g, dot product %g", got, exact));
  endtask

  initial begin
    checks = 0; failures = 0; fin = 0;
    act_we = 0; wt_we = 0; read_data = 0; op_clear = 0;
    act_waddr = '0; wt_waddr = '0; op_psum_addr = '0; psum_raddr = '0;
    act_wdata = '0; wt_wdata = '0; op_len = '0; fmt_act = '0; fmt_wt = '0;
    foreach (model[i]) model[i] = '{s: 0, e: 0, m: 0};
    @(negedge reset);
    @(negedge clk);
    for (int t = 0; t < NOPS; t++)
      run_op($urandom_range(BD, 1), t % 3, (t % 3) == t);
    fin = 1;
  end
endmodule
