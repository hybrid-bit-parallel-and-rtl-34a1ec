// Testbench for exponent_normalizer_dual: random signed exponent pairs (near
// and far apart) and zero flags go to a parallel and a serial instance. The
// common exponent and the shift amounts are compared with values worked out
// here (larger exponent wins, the other shifts by the difference saturated at
// ACC_W, zero operands never set the exponent); latencies must be 1 cycle and
// XW + 3 cycles.
module tb_exponent_normalizer_dual;
  localparam int W = 16, ACC_W = 24;
  localparam int XW = W + 6, SW = $clog2(ACC_W + 1);
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic signed [XW-1:0] ep, es;
  logic zp, zs;
  logic done_p, done_s;
  logic signed [XW-1:0] em_p, em_s;
  logic [SW-1:0] shp_p, shs_p, shp_s, shs_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  exponent_normalizer_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W), .ACC_W(ACC_W)) dut_p (
    .clk, .reset, .start, .e_p(ep), .z_p(zp), .e_s(es), .z_s(zs), .done(done_p),
    .e_max(em_p), .sh_p(shp_p), .sh_s(shs_p));
  exponent_normalizer_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W), .ACC_W(ACC_W)) dut_s (
    .clk, .reset, .start, .e_p(ep), .z_p(zp), .e_s(es), .z_s(zs), .done(done_s),
    .e_max(em_s), .sh_p(shp_s), .sh_s(shs_s));

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
    int lat_p, lat_s, cyc, x_em, x_shp, x_shs, a, b;
    ep = '0; es = '0; zp = 0; zs = 0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      a = $urandom_range(200, 0) - 100;
      b = (t % 3 == 0) ? $urandom_range(200000, 0) - 100000 : a + $urandom_range(60, 0) - 30;
      zp = (t % 7 == 3); zs = (t % 5 == 4);
      ep = XW'(a); es = XW'(b);
      if (zp) begin x_em = b; x_shp = 0; x_shs = 0; end
      else if (zs) begin x_em = a; x_shp = 0; x_shs = 0; end
      else if (a >= b) begin x_em = a; x_shp = 0; x_shs = (a - b > ACC_W) ? ACC_W : a - b; end
      else begin x_em = b; x_shs = 0; x_shp = (b - a > ACC_W) ? ACC_W : b - a; end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      ep = ~ep; es = ~es; zp = ~zp; zs = ~zs;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(int'(em_p) == x_em && int'(shp_p) == x_shp && int'(shs_p) == x_shs,
                $sformatf("parallel a=%0d b=%0d got %0d %0d %0d", a, b, em_p, shp_p, shs_p));
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(int'(em_s) == x_em && int'(shp_s) == x_shp && int'(shs_s) == x_shs,
                $sformatf("serial a=%0d b=%0d got %0d %0d %0d", a, b, em_s, shp_s, shs_s));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == XW + 3, $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
