// Testbench for accumulator_dual: random sign-magnitude operand pairs
// (including equal magnitudes of opposite sign and sums that carry out) go to
// a parallel and a serial instance. The result is compared with the signed sum
// worked out with integer arithmetic, renormalized by one bit on carry-out;
// latencies must be 1 cycle and ACC_W + 4 cycles.
module tb_accumulator_dual;
  localparam int W = 16, ACC_W = 24, XW = W + 6;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic sp, ss;
  logic [ACC_W-1:0] ap, as_;
  logic signed [XW-1:0] ein;
  logic done_p, done_s, so_p, so_s;
  logic [ACC_W-1:0] mo_p, mo_s;
  logic signed [XW-1:0] eo_p, eo_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  accumulator_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W), .ACC_W(ACC_W)) dut_p (.clk, .reset,
    .start, .s_p(sp), .a_p(ap), .s_s(ss), .a_s(as_), .e_in(ein), .done(done_p),
    .s_out(so_p), .m_out(mo_p), .e_out(eo_p));
  accumulator_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W), .ACC_W(ACC_W)) dut_s (.clk, .reset,
    .start, .s_p(sp), .a_p(ap), .s_s(ss), .a_s(as_), .e_in(ein), .done(done_s),
    .s_out(so_s), .m_out(mo_s), .e_out(eo_s));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_p, lat_s, cyc, xe;
    longint vp, vs, r, xm;
    bit xs;
    sp = 0; ss = 0; ap = '0; as_ = '0; ein = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      vp = longint'($urandom) & ((64'd1 << ACC_W) - 1);
      vs = longint'($urandom) & ((64'd1 << ACC_W) - 1);
      if (t % 4 == 1) vs = vp;
      sp = 1'($urandom); ss = 1'($urandom);
      if (t == 1) ss = ~sp;
      if (t == 2) begin vp = (64'd1 << ACC_W) - 1; vs = vp; ss = sp; end
      ein = XW'($urandom_range(200, 0) - 100);
      r = (sp ? -vp : vp) + (ss ? -vs : vs);
      xs = (r < 0);
      if (r < 0) r = -r;
      xe = int'(ein);
      xm = r;
      if (r >= (64'd1 << ACC_W)) begin xm = r >> 1; xe = xe + 1; end
      ap = ACC_W'(vp); as_ = ACC_W'(vs);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      ap = ~ap; as_ = ~as_; sp = ~sp; ss = ~ss; ein = ~ein;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(so_p == xs && 64'(mo_p) == xm && int'(eo_p) == xe,
                $sformatf("parallel t=%0d got %0d %0d %0d exp %0d %0d %0d", t, so_p, mo_p, eo_p, xs, xm, xe));
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(so_s == xs && 64'(mo_s) == xm && int'(eo_s) == xe,
                $sformatf("serial t=%0d got %0d %0d %0d exp %0d %0d %0d", t, so_s, mo_s, eo_s, xs, xm, xe));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == ACC_W + 4, $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
