// tb_pe_hybrid_configs: a spread of parallel/serial configurations of the PE.
//
// Builds one lane (tb_pe_sweep_lane) for each of 32 values of the 8-bit
// CONFIG vector: all serial, all parallel, each block alone parallel
// (one-hot), each block alone serial (one-cold), and 14 mixed vectors
// (c * 37 + 11) mod 256. The one-hot and one-cold lanes are the single-bit
// toggles by which the cost of each block's mode is measured. Building all
// 256 variants is possible but slow to compile. Each lane uses a 3-bit
// operand width and runs random dot products in random formats
// of up to 3 bits (1- to 3-bit integers and tiny floats such as sign + 1
// exponent + 1 mantissa bit) through each. Every lane checks its results bit
// for bit against the reference model and its read_data-to-done_r cycle
// counts against the sum of the sub-blocks' latencies, so the test shows
// that all configurations compute the same values and differ only in time.
// The testbench prints the summed counts when every lane has finished, or
// counts a failure when the watchdog fires first.
module tb_pe_hybrid_configs;
  localparam int W = 3, NCFG = 32;

  logic clk = 1'b0, reset = 1'b1;
  int   lane_checks [NCFG], lane_failures [NCFG];
  logic lane_fin [NCFG];

  always #5 clk = ~clk;

  function automatic bit [7:0] cfg_of(int c);
    if (c == 0) return 8'h00;
    if (c == 1) return 8'hFF;
    if (c < 10) return 8'(1 << (c - 2));
    if (c < 18) return ~8'(1 << (c - 10));
    return 8'(c * 37 + 11);
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_c
    tb_pe_sweep_lane #(.W(W), .CONFIG(cfg_of(c)), .NOPS(3)) u_lane (
      .clk, .reset, .checks(lane_checks[c]), .failures(lane_failures[c]), .fin(lane_fin[c]));
  end

  function automatic bit all_fin();
    foreach (lane_fin[c]) if (!lane_fin[c]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report(int extra_fail);
    int checks, failures;
    checks = 0;
    failures = extra_fail;
    foreach (lane_checks[c]) begin
      checks += lane_checks[c];
      failures += lane_failures[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    while (!all_fin()) @(negedge clk);
    @(negedge clk);
    report(0);
    $finish;
  end
endmodule
