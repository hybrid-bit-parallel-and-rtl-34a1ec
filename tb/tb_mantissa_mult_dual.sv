// Testbench for mantissa_mult_dual: builds the column-organized primitives of
// two random mantissas of random lengths (col[i+j][i] = a[i] & b[j]) and
// checks that both the parallel and the serial instance return the integer
// product a * b, with latencies of 1 cycle and b_len + 2 cycles.
module tb_mantissa_mult_dual;
  localparam int W = 16;
  localparam int LW = $clog2(W + 1) + 1;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [2*W-2:0][W-1:0] col;
  logic [LW-1:0] la, lb;
  logic done_p, done_s;
  logic [2*W-1:0] prod_p, prod_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mantissa_mult_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W)) dut_p (.clk, .reset, .start,
    .col, .a_len(la), .b_len(lb), .done(done_p), .product(prod_p));
  mantissa_mult_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W)) dut_s (.clk, .reset, .start,
    .col, .a_len(la), .b_len(lb), .done(done_s), .product(prod_s));

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

  initial begin
    int lat_p, lat_s, cyc, ila, ilb;
    longint unsigned a, b, expect_p;
    col = '0; la = '0; lb = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      ila = (t == 0) ? W : $urandom_range(W, 1);
      ilb = (t == 0) ? W : (t == 1) ? 0 : $urandom_range(W, 1);
      a = longint'($urandom) & ((64'd1 << ila) - 1);
      b = longint'($urandom) & ((64'd1 << ilb) - 1);
      if (t == 0) begin a = (64'd1 << W) - 1; b = a; end
      expect_p = a * b;
      col = '0;
      for (int i = 0; i < ila; i++)
        for (int j = 0; j < ilb; j++) col[i+j][i] = a[i] & b[j];
      la = LW'(ila); lb = LW'(ilb);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      col = ~col;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(64'(prod_p) == expect_p, $sformatf("parallel %0d*%0d=%0d got %0d", a, b, expect_p, prod_p));
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(64'(prod_s) == expect_p, $sformatf("serial %0d*%0d=%0d got %0d", a, b, expect_p, prod_s));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == ((ila == 0 || ilb == 0) ? 2 : ilb + 2),
            $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
