// Testbench for concat_shift_tree_dual: random mantissas with random shift
// amounts from 0 to ACC_W (one or both operands shifted) go to a parallel and
// a serial instance; outputs must equal m >> sh, latencies 1 cycle and
// sh_p + sh_s + 2 cycles.
module tb_concat_shift_tree_dual;
  localparam int ACC_W = 24, SW = $clog2(ACC_W + 1);
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [ACC_W-1:0] mp, ms, ap_p, as_p, ap_s, as_s;
  logic [SW-1:0] shp, shs;
  logic done_p, done_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  concat_shift_tree_dual #(.PARALLEL(1'b1), .ACC_W(ACC_W)) dut_p (.clk, .reset, .start,
    .m_p(mp), .sh_p(shp), .m_s(ms), .sh_s(shs), .done(done_p), .a_p(ap_p), .a_s(as_p));
  concat_shift_tree_dual #(.PARALLEL(1'b0), .ACC_W(ACC_W)) dut_s (.clk, .reset, .start,
    .m_p(mp), .sh_p(shp), .m_s(ms), .sh_s(shs), .done(done_s), .a_p(ap_s), .a_s(as_s));

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
    int lat_p, lat_s, cyc, a, b;
    longint unsigned vp, vs, xp, xs;
    mp = '0; ms = '0; shp = '0; shs = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      vp = longint'($urandom) & ((64'd1 << ACC_W) - 1);
      vs = longint'($urandom) & ((64'd1 << ACC_W) - 1);
      a = (t % 2 == 0) ? $urandom_range(ACC_W, 0) : 0;
      b = (t % 2 == 1 || t % 5 == 0) ? $urandom_range(ACC_W, 0) : 0;
      if (t == 1) b = ACC_W;
      xp = vp >> a; xs = vs >> b;
      mp = ACC_W'(vp); ms = ACC_W'(vs); shp = SW'(a); shs = SW'(b);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      mp = ~mp; ms = ~ms;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(64'(ap_p) == xp && 64'(as_p) == xs, $sformatf("parallel shift %0d/%0d", a, b));
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(64'(ap_s) == xp && 64'(as_s) == xs, $sformatf("serial shift %0d/%0d", a, b));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == a + b + 2, $sformatf("serial latency %0d for %0d+%0d", lat_s, a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
