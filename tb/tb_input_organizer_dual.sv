// Testbench for input_organizer_dual: random primitive arrays confined to
// random active lengths go to a parallel and a serial instance. Each output
// column k must hold prim[i][k-i] at entry i and zeros elsewhere; latencies
// must be 1 cycle (parallel) and a_len * b_len + 2 cycles (serial).
module tb_input_organizer_dual;
  localparam int W = 16;
  localparam int LW = $clog2(W + 1) + 1;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [W-1:0][W-1:0] prim;
  logic [LW-1:0] la, lb;
  logic done_p, done_s;
  logic [2*W-2:0][W-1:0] col_p, col_s;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_organizer_dual #(.PARALLEL(1'b1), .REGISTER_WIDTH(W)) dut_p (.clk, .reset, .start,
    .prim, .a_len(la), .b_len(lb), .done(done_p), .col(col_p));
  input_organizer_dual #(.PARALLEL(1'b0), .REGISTER_WIDTH(W)) dut_s (.clk, .reset, .start,
    .prim, .a_len(la), .b_len(lb), .done(done_s), .col(col_s));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit col_ok(logic [2*W-2:0][W-1:0] c, logic [W-1:0][W-1:0] p);
    for (int k = 0; k < 2 * W - 1; k++)
      for (int i = 0; i < W; i++) begin
        logic e;
        e = (k - i >= 0 && k - i < W) ? p[i][k-i] : 1'b0;
        if (c[k][i] != e) return 1'b0;
      end
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
    logic [W-1:0][W-1:0] ep;
    prim = '0; la = '0; lb = '0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      ila = (t == 0) ? W : $urandom_range(W, 1);
      ilb = (t == 0) ? W : (t == 1) ? 0 : $urandom_range(W, 1);
      ep = '0;
      for (int i = 0; i < ila; i++)
        for (int j = 0; j < ilb; j++) ep[i][j] = 1'($urandom);
      prim = ep; la = LW'(ila); lb = LW'(ilb);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      prim = ~prim;
      cyc = 1; lat_p = -1; lat_s = -1;
      while ((lat_p < 0 || lat_s < 0) && cyc < 1000) begin
        if (done_p && lat_p < 0) begin
          lat_p = cyc;
          check(col_ok(col_p, ep), "parallel columns");
        end
        if (done_s && lat_s < 0) begin
          lat_s = cyc;
          check(col_ok(col_s, ep), "serial columns");
        end
        @(negedge clk);
        cyc++;
      end
      check(lat_p == 1, $sformatf("parallel latency %0d", lat_p));
      check(lat_s == ila * ilb + 2, $sformatf("serial latency %0d", lat_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
