// End-to-end testbench for pe_hybrid. Four PEs are built with different
// CONFIG vectors (the default hybrid 1010_0000, all parallel, all serial, and
// the complement 0101_1111) so that every sub-block runs in both modes. They
// receive identical operations: dot products of random length in many number
// formats (FP16, BF16, FP8 E4M3 x E5M2, FP6, FP4, INT8, INT4 x UINT4, UINT16,
// 1-bit binary), accumulated into random partial-sum entries with and without
// clearing. Every result is compared with the integer reference model
// (tb_ref_pkg), integer results with the exact dot product and float results
// with the real-number dot product within the truncation error; the number of
// cycles from read_data to done_r is compared with the sum of the
// sub-blocks' latencies for each configuration. The mechanisms of the design
// (each block serial and parallel, alignment shifts of either operand,
// saturated shifts, truncated products, subnormals, zero products, sign
// cancellation, accumulator carry-out, cleared and continued partial sums,
// mixed formats, empty operations, read_data while busy) are counted, and one
// that never happened counts as a failure.
module tb_pe_hybrid;
  import hybrid_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16, ACC_W = 24, XW = W + 6, BD = 16, PD = 16;
  localparam int NPE = 4;
  localparam bit [7:0] CFGS [NPE] = '{8'b1010_0000, 8'b1111_1111, 8'b0000_0000, 8'b0101_1111};

  logic clk = 1'b0, reset = 1'b1;
  logic act_we = 0, wt_we = 0, read_data = 0, op_clear = 0;
  logic [3:0] act_waddr = '0, wt_waddr = '0, op_psum_addr = '0, psum_raddr = '0;
  logic [W-1:0] act_wdata = '0, wt_wdata = '0;
  logic [4:0] op_len = '0;
  fmt_t fmt_act = '0, fmt_wt = '0;
  logic busy [NPE], done_r [NPE], rsign [NPE];
  logic signed [XW-1:0] rexp [NPE];
  logic [ACC_W-1:0] rman [NPE];
  int checks = 0, failures = 0;
  int blk_done [NPE][8];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NPE; g++) begin : g_pe
    pe_hybrid #(.CONFIG(CFGS[g])) u_pe (
      .clk, .reset, .act_we, .act_waddr, .act_wdata, .wt_we, .wt_waddr, .wt_wdata,
      .fmt_act, .fmt_wt, .read_data, .op_len, .op_psum_addr, .op_clear,
      .busy(busy[g]), .done_r(done_r[g]), .psum_raddr, .psum_rsign(rsign[g]),
      .psum_rexp(rexp[g]), .psum_rman(rman[g]));

    // Completed runs of each sub-block, indexed by CONFIG bit position.
    always @(posedge clk) begin
      if (u_pe.mul_done) blk_done[g][CFG_MUL]++;
      if (u_pe.add_done) blk_done[g][CFG_ADD]++;
      if (u_pe.acc_done) blk_done[g][CFG_ACCU]++;
      if (u_pe.cst_done) blk_done[g][CFG_CST]++;
      if (u_pe.en_done)  blk_done[g][CFG_EN]++;
      if (u_pe.org_done) blk_done[g][CFG_IORG]++;
      if (u_pe.pg_done)  blk_done[g][CFG_PG]++;
      if (u_pe.sa_done)  blk_done[g][CFG_SA]++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- mechanisms
  typedef enum int {
    M_SHIFT_P, M_SHIFT_S, M_SHIFT_SAT, M_TRUNC, M_SUBNORMAL, M_ZERO_PROD,
    M_CANCEL, M_EXACT_ZERO, M_CARRY, M_CLEAR, M_CONTINUE, M_MIXED, M_EMPTY,
    M_BUSY_IGNORED, M_NUM
  } mech_t;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"product shifted", "partial sum shifted", "saturated shift",
    "truncated product", "subnormal operand", "zero product", "sign cancellation",
    "exact zero result", "accumulator carry-out", "cleared partial sum",
    "continued partial sum", "mixed formats", "empty operation", "read_data while busy"};

  ref_psum_t model [PD];

  function automatic fmt_t mk(bit s, int e, int m);
    return '{sign_en: s, exp_bits: 6'(e), man_bits: 6'(m)};
  endfunction

  function automatic logic [W-1:0] rand_word(fmt_t f);
    int n;
    n = int'(f.sign_en) + int'(f.exp_bits) + int'(f.man_bits);
    return W'($urandom) & ~({W{1'b1}} << n) | ((n >= W) ? W'($urandom) : '0);
  endfunction

  function automatic int blk_lat(bit par, int serial_lat);
    return par ? 1 : serial_lat;
  endfunction

  // Cycles one element takes in a PE of configuration c.
  function automatic int elem_cycles(bit [7:0] c, ref_info_t i);
    int sa, pg, add, org, mul, en, cst, acc, front, nz;
    nz  = (i.la != 0 && i.lb != 0);
    sa  = blk_lat(c[CFG_SA], 3);
    pg  = blk_lat(c[CFG_PG], i.la * i.lb + 2);
    add = blk_lat(c[CFG_ADD], XW + 2);
    org = blk_lat(c[CFG_IORG], i.la * i.lb + 2);
    mul = blk_lat(c[CFG_MUL], nz ? i.lb + 2 : 2);
    en  = blk_lat(c[CFG_EN], XW + 3);
    cst = blk_lat(c[CFG_CST], i.sh_p + i.sh_s + 2);
    acc = blk_lat(c[CFG_ACCU], ACC_W + 4);
    front = (sa > pg) ? sa : pg;
    front = (front > add) ? front : add;
    return 1 + front + (1 + org) + (1 + mul) + (1 + en) + (1 + cst) + (1 + acc) + 1;
  endfunction

  task automatic run_op(fmt_t fa, fmt_t fw, int len, int addr, bit clear, bit is_int);
    logic [W-1:0] aw [BD], ww [BD];
    ref_psum_t ps;
    ref_info_t info;
    int exp_cyc [NPE], got_cyc [NPE], cyc, left;
    real exact, absum, got, start_val;
    bit exact_ok;

    // fill the buffers
    for (int i = 0; i < len; i++) begin
      aw[i] = rand_word(fa);
      ww[i] = rand_word(fw);
      @(negedge clk);
      act_we = 1; act_waddr = 4'(i); act_wdata = aw[i];
      wt_we = 1; wt_waddr = 4'(i); wt_wdata = ww[i];
    end
    @(negedge clk);
    act_we = 0; wt_we = 0;

    // reference
    ps = clear ? ref_psum_t'{s: 0, e: 0, m: 0} : model[addr];
    start_val = psum_value(ps.s, ps.e, ps.m);
    exact = start_val; absum = (start_val < 0) ? -start_val : start_val;
    foreach (exp_cyc[g]) exp_cyc[g] = 1;
    for (int i = 0; i < len; i++) begin
      real pv;
      ps = mac_step(ps, aw[i], ww[i], fa, fw, ACC_W, info);
      pv = word_value(aw[i], fa) * word_value(ww[i], fw);
      exact += pv;
      absum += (pv < 0) ? -pv : pv;
      foreach (exp_cyc[g]) exp_cyc[g] += elem_cycles(CFGS[g], info);
      if (info.sh_p != 0) mech[M_SHIFT_P]++;
      if (info.sh_s != 0) mech[M_SHIFT_S]++;
      if (info.sh_p == ACC_W || info.sh_s == ACC_W) mech[M_SHIFT_SAT]++;
      if (info.truncated) mech[M_TRUNC]++;
      if (info.subnormal) mech[M_SUBNORMAL]++;
      if (info.zero_prod) mech[M_ZERO_PROD]++;
      if (info.cancel) mech[M_CANCEL]++;
      if (info.exact_zero) mech[M_EXACT_ZERO]++;
      if (info.carry) mech[M_CARRY]++;
    end
    if (clear) mech[M_CLEAR]++; else mech[M_CONTINUE]++;
    if (fa != fw) mech[M_MIXED]++;
    if (len == 0) mech[M_EMPTY]++;

    // start all PEs
    @(negedge clk);
    fmt_act = fa; fmt_wt = fw; op_len = 5'(len); op_psum_addr = 4'(addr); op_clear = clear;
    read_data = 1;
    @(negedge clk);
    read_data = 0;
    fmt_act = '0; fmt_wt = '0; op_len = '0; op_clear = ~clear;   // must have been latched
    foreach (got_cyc[g]) got_cyc[g] = -1;
    cyc = 1; left = NPE;
    while (left > 0 && cyc < 400000) begin
      foreach (got_cyc[g])
        if (done_r[g] && got_cyc[g] < 0) begin
          got_cyc[g] = cyc;
          left--;
        end
      if (cyc == 3 && busy[0] && len > 0) begin
        // a second read_data while busy must be ignored
        read_data = 1;
        mech[M_BUSY_IGNORED]++;
      end else begin
        read_data = 0;
      end
      @(negedge clk);
      cyc++;
    end
    model[addr] = ps;

    // compare
    psum_raddr = 4'(addr);
    #1;
    foreach (got_cyc[g]) begin
      check(got_cyc[g] == exp_cyc[g], $sformatf("cfg %b: %0d cycles, expected %0d (len %0d)",
                                                 CFGS[g], got_cyc[g], exp_cyc[g], len));
      check(rsign[g] == ps.s && int'(rexp[g]) == ps.e && 64'(rman[g]) == ps.m,
            $sformatf("cfg %b: psum s=%0d e=%0d m=%0h, model s=%0d e=%0d m=%0h", CFGS[g],
                      rsign[g], rexp[g], rman[g], ps.s, ps.e, ps.m));
      got = psum_value(rsign[g], int'(rexp[g]), 64'(rman[g]));
      if (is_int) exact_ok = (got == exact);
      else begin
        real err;
        err = got - exact;
        if (err < 0) err = -err;
        exact_ok = (err <= absum * (2.0 ** (-(ACC_W - 6))) + 1e-300);
      end
      check(exact_ok, $sformatf("cfg %b: value %g, dot product %g", CFGS[g], got, exact));
    end
  endtask

  initial begin
    fmt_t fp16, bf16, e4m3, e5m2, fp6, fp4, int8, int4, uint4, uint16, bin1;
    fp16 = mk(1, 5, 10); bf16 = mk(1, 8, 7); e4m3 = mk(1, 4, 3); e5m2 = mk(1, 5, 2);
    fp6 = mk(1, 3, 2); fp4 = mk(1, 2, 1); int8 = mk(1, 0, 7); int4 = mk(1, 0, 3);
    uint4 = mk(0, 0, 4); uint16 = mk(0, 0, 16); bin1 = mk(0, 0, 1);
    foreach (model[i]) model[i] = '{s: 0, e: 0, m: 0};
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    run_op(int8, int8, 16, 0, 1, 1);
    run_op(int8, int8, 8, 0, 0, 1);
    run_op(fp16, fp16, 16, 1, 1, 0);
    run_op(fp16, fp16, 5, 1, 0, 0);
    run_op(bf16, bf16, 12, 2, 1, 0);
    run_op(e4m3, e5m2, 16, 3, 1, 0);
    run_op(fp6, fp6, 16, 4, 1, 0);
    run_op(fp4, fp4, 16, 5, 1, 0);
    run_op(int4, uint4, 16, 6, 1, 1);
    run_op(uint16, uint16, 6, 7, 1, 0);
    run_op(bin1, bin1, 16, 8, 1, 1);
    run_op(fp16, fp16, 0, 9, 1, 0);
    for (int t = 0; t < 16; t++) begin
      fmt_t fl [8];
      fl = '{fp16, bf16, e4m3, e5m2, fp6, fp4, int8, int4};
      run_op(fl[t % 8], fl[(t * 3 + 1) % 8], $urandom_range(16, 1), 10 + t % 6, (t % 3 == 0),
             (t % 8 >= 6) && ((t * 3 + 1) % 8 >= 6));
    end
    // every mechanism happened, and every block ran in both modes
    for (int m = 0; m < M_NUM; m++) begin
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
      $display("mechanism %-24s : %0d", mech_name[m], mech[m]);
    end
    for (int b = 0; b < 8; b++) begin
      int n_par, n_ser;
      n_par = 0; n_ser = 0;
      for (int g = 0; g < NPE; g++)
        if (CFGS[g][b]) n_par += blk_done[g][b]; else n_ser += blk_done[g][b];
      $display("CONFIG bit %0d: %0d parallel runs, %0d serial runs", b, n_par, n_ser);
      check(n_par > 0 && n_ser > 0, $sformatf("CONFIG bit %0d not run in both modes", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
