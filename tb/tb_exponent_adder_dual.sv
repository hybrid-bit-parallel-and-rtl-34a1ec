// Testbench for exponent_adder_dual: random exponent pairs and signed
// offsets, including the extremes, go to a parallel and a serial instance;
// both sums must equal exp_a + exp_b + offset as a signed XW-bit number, with
// latencies of 1 cycle and XW + 2 cycles.
module tb_exponent_adder_dual;
  localparam int W  = 16;
  localparam int XW = W + 6;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [W-1:0] ea, eb;
  logic signed [XW-1:0] off;
  logic done_p, done_s;
  logic signed [XW-1:0] sum_p, sum_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  exponent_adder_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W)) dut_p (.clk, .reset, .start,
    .exp_a(ea), .exp_b(eb), .offset(off), .done(done_p), .sum(sum_p));
  exponent_adder_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W)) dut_s (.clk, .reset, .start,
    .exp_a(ea), .exp_b(eb), .offset(off), .done(done_s), .sum(sum_s));

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
    int lat_p, lat_s, cyc;
    longint expect_s;
    ea = '0; eb = '0; off = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      case (t)
        0: begin ea = '1; eb = '1; off = '0; end
        1: begin ea = 15; eb = 15; off = -(15 + 15 + 10 + 10); end   // FP16 1.0 * 1.0
        2: begin ea = 0; eb = 0; off = '0; end
        default: begin
          ea = W'($urandom); eb = W'($urandom);
          off = -XW'($urandom_range(70000, 0));
        end
      endcase
      expect_s = longint'(ea) + longint'(eb) + longint'(off);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      ea = ~ea; eb = ~eb;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(longint'(sum_p) == expect_s, $sformatf("parallel sum %0d exp %0d", sum_p, expect_s));
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(longint'(sum_s) == expect_s, $sformatf("serial sum %0d exp %0d", sum_s, expect_s));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == XW + 2, $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
