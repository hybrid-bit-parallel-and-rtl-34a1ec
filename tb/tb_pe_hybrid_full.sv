// Full-size testbench for pe_hybrid: the PE exactly as delivered (all
// parameters at their defaults, CONFIG = 1010_0000) runs two complete
// operations over the whole 16-entry buffers: an FP16 dot product into a
// cleared partial sum, then an INT8 dot product into another entry followed
// by a second INT8 operation that continues it. Results are compared with the
// reference model and with the real / exact integer dot product; cycle
// counts are compared with the sum of the sub-blocks' latencies.
module tb_pe_hybrid_full;
  import hybrid_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 16, ACC_W = 24, XW = W + 6, BD = 16;
  localparam bit [7:0] CFG = 8'b1010_0000;

  logic clk = 1'b0, reset = 1'b1;
  logic act_we = 0, wt_we = 0, read_data = 0, op_clear = 0;
  logic [3:0] act_waddr = '0, wt_waddr = '0, op_psum_addr = '0, psum_raddr = '0;
  logic [W-1:0] act_wdata = '0, wt_wdata = '0;
  logic [4:0] op_len = '0;
  fmt_t fmt_act = '0, fmt_wt = '0;
  logic busy, done_r, rsign;
  logic signed [XW-1:0] rexp;
  logic [ACC_W-1:0] rman;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_hybrid u_pe (
    .clk, .reset, .act_we, .act_waddr, .act_wdata, .wt_we, .wt_waddr, .wt_wdata,
    .fmt_act, .fmt_wt, .read_data, .op_len, .op_psum_addr, .op_clear, .busy, .done_r,
    .psum_raddr, .psum_rsign(rsign), .psum_rexp(rexp), .psum_rman(rman));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_psum_t model [16];

  task automatic run_op(fmt_t f, int addr, bit clear, bit is_int);
    logic [W-1:0] aw [BD], ww [BD];
    ref_psum_t ps;
    ref_info_t info;
    int exp_cyc, cyc, n;
    real exact, absum, got, err;
    n = int'(f.sign_en) + int'(f.exp_bits) + int'(f.man_bits);
    for (int i = 0; i < BD; i++) begin
      aw[i] = W'($urandom) & ~({W{1'b1}} << n);
      ww[i] = W'($urandom) & ~({W{1'b1}} << n);
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
    for (int i = 0; i < BD; i++) begin
      real pv;
      int front, pg, org, cst;
      ps = mac_step(ps, aw[i], ww[i], f, f, ACC_W, info);
      pv = word_value(aw[i], f) * word_value(ww[i], f);
      exact += pv;
      absum += (pv < 0) ? -pv : pv;
      // CONFIG 1010_0000: Mul and Accu parallel, the rest serial
      pg  = info.la * info.lb + 2;
      org = info.la * info.lb + 2;
      cst = info.sh_p + info.sh_s + 2;
      front = (pg > XW + 2) ? pg : XW + 2;
      exp_cyc += 1 + front + (1 + org) + (1 + 1) + (1 + XW + 3) + (1 + cst) + (1 + 1) + 1;
    end
    model[addr] = ps;
    @(negedge clk);
    fmt_act = f; fmt_wt = f; op_len = 5'(BD); op_psum_addr = 4'(addr); op_clear = clear;
    read_data = 1;
    @(negedge clk);
    read_data = 0;
    cyc = 1;
    while (!done_r && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == exp_cyc, $sformatf("%0d cycles, expected %0d", cyc, exp_cyc));
    psum_raddr = 4'(addr);
    #1;
    check(rsign == ps.s && int'(rexp) == ps.e && 64'(rman) == ps.m,
          $sformatf("psum s=%0d e=%0d m=%0h, model s=%0d e=%0d m=%0h", rsign, rexp, rman,
                    ps.s, ps.e, ps.m));
    got = psum_value(rsign, int'(rexp), 64'(rman));
    err = got - exact;
    if (err < 0) err = -err;
    if (is_int) check(got == exact, $sformatf("integer dot product %g, got %g", exact, got));
    else check(err <= absum * (2.0 ** (-(ACC_W - 6))), $sformatf("dot product %g, got %g", exact, got));
    $display("operation %0d: %0d cycles, result %g, dot product %g", addr, cyc, got, exact);
  endtask

  initial begin
    fmt_t fp16, int8;
    fp16 = '{sign_en: 1'b1, exp_bits: 6'd5, man_bits: 6'd10};
    int8 = '{sign_en: 1'b1, exp_bits: 6'd0, man_bits: 6'd7};
    foreach (model[i]) model[i] = '{s: 0, e: 0, m: 0};
    repeat (3) @(negedge clk);
    reset = 0;
    run_op(fp16, 0, 1, 0);
    run_op(int8, 1, 1, 1);
    run_op(int8, 1, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
