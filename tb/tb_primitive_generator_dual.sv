// Testbench for primitive_generator_dual: a parallel and a serial instance
// receive the same random mantissas of random active lengths. Every primitive
// is compared with a[i] & b[j] (0 outside the active lengths) and the
// latencies with 1 cycle (parallel) and a_len * b_len + 2 cycles (serial).
module tb_primitive_generator_dual;
  localparam int W = 16;
  localparam int LW = $clog2(W + 1) + 1;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [W-1:0] a, b;
  logic [LW-1:0] la, lb;
  logic done_p, done_s;
  logic [W-1:0][W-1:0] prim_p, prim_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  primitive_generator_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W)) dut_p (.clk, .reset,
    .start, .a_man(a), .b_man(b), .a_len(la), .b_len(lb), .done(done_p), .prim(prim_p));
  primitive_generator_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W)) dut_s (.clk, .reset,
    .start, .a_man(a), .b_man(b), .a_len(la), .b_len(lb), .done(done_s), .prim(prim_s));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit prim_ok(logic [W-1:0][W-1:0] p, logic [W-1:0] x, logic [W-1:0] y,
                                 int lx, int ly);
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        if (p[i][j] != ((i < lx && j < ly) ? (x[i] && y[j]) : 1'b0)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat_p, lat_s, cyc, ila, ilb;
    logic [W-1:0] ea, eb;
    a = '0; b = '0; la = '0; lb = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      ila = (t == 0) ? W : (t == 1) ? 0 : (t == 2) ? 1 : $urandom_range(W, 1);
      ilb = (t == 0) ? W : (t == 1) ? 3 : (t == 2) ? 1 : $urandom_range(W, 1);
      ea = W'($urandom) & ~({W{1'b1}} << ila);
      if (ila == W) ea = W'($urandom);
      eb = W'($urandom) & ~({W{1'b1}} << ilb);
      if (ilb == W) eb = W'($urandom);
      if (t == 0) begin ea = '1; eb = '1; end
      a = ea; b = eb; la = LW'(ila); lb = LW'(ilb);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      a = ~a; b = ~b;   // operands must already be latched
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(prim_ok(prim_p, ea, eb, ila, ilb), "parallel primitives");
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(prim_ok(prim_s, ea, eb, ila, ilb), $sformatf("serial primitives la=%0d lb=%0d", ila, ilb));
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == ila * ilb + 2, $sformatf("serial latency %0d for %0dx%0d", lat_s, ila, ilb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
