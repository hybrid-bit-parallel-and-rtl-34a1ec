// Testbench for sign_analyzer_dual: drives a parallel and a serial instance
// with the same random sign pairs, checks the product sign against the XOR
// of the inputs, and checks the latencies (1 cycle parallel, 3 cycles serial).
module tb_sign_analyzer_dual;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic sa, sb, done_p, done_s, out_p, out_s;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sign_analyzer_dual #(.PARALLEL(1'b1)) dut_p (.clk, .reset, .start, .sign_act(sa),
    .sign_wt(sb), .done(done_p), .sign_out(out_p));
  sign_analyzer_dual #(.PARALLEL(1'b0)) dut_s (.clk, .reset, .start, .sign_act(sa),
    .sign_wt(sb), .done(done_s), .sign_out(out_s));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_p, lat_s, cyc;
    logic exp_sign;
    sa = 0; sb = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      sa = 1'($urandom); sb = 1'($urandom);
      exp_sign = (sa != sb);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      sa = ~sa;   // operands must already be latched
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 100) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(out_p == exp_sign, "parallel sign");
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(out_s == exp_sign, "serial sign");
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == 3, $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
