// tb_pe_hybrid_sweep: width and configuration sweep of the PE.
//
// The PE is meant to be built at any operand width from 1 to 16 bits and in
// any of the 256 parallel/serial configurations. This testbench builds one
// lane (tb_pe_sweep_lane) per pair of width W in {1, 2, 3, 4, 5, 8, 12, 16, 32}
// and configuration in {all serial 0000_0000, all parallel 1111_1111, the
// default 1010_0000, and a mixed vector that differs from lane to lane}, and
// runs random dot products in random formats that fit W through each. Every
// lane checks its results bit for bit against the reference model and its
// read_data-to-done_r cycle counts against the sum of the sub-blocks'
// latencies. The testbench prints the summed counts when every lane has
// finished, or counts a failure when the watchdog fires first.
module tb_pe_hybrid_sweep;
  localparam int NW_ = 9, NC = 4;
  localparam int WS [NW_] = '{1, 2, 3, 4, 5, 8, 12, 16, 32};
  localparam bit [7:0] CS [NC] = '{8'b0000_0000, 8'b1111_1111, 8'b1010_0000, 8'b0110_1001};

  logic clk = 1'b0, reset = 1'b1;
  int   lane_checks [NW_][NC], lane_failures [NW_][NC];
  logic lane_fin [NW_][NC];

  always #5 clk = ~clk;

  for (genvar w = 0; w < NW_; w++) begin : g_w
    for (genvar c = 0; c < NC; c++) begin : g_c
      // The mixed vector is rotated per width so different blocks go serial.
      localparam bit [7:0] CFG = (c == 3) ? 8'((CS[3] << w) | (CS[3] >> (8 - w))) : CS[c];
      tb_pe_sweep_lane #(.W(WS[w]), .CONFIG(CFG)) u_lane (
        .clk, .reset, .checks(lane_checks[w][c]), .failures(lane_failures[w][c]),
        .fin(lane_fin[w][c]));
    end
  end

  function automatic bit all_fin();
    foreach (lane_fin[w, c]) if (!lane_fin[w][c]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic report(int extra_fail);
    int checks, failures;
    checks = 0;
    failures = extra_fail;
    foreach (lane_checks[w, c]) begin
      checks += lane_checks[w][c];
      failures += lane_failures[w][c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    while (!all_fin()) @(negedge clk);
    @(negedge clk);
    foreach (lane_checks[w, c])
      $display("W=%0d lane %0d: checks=%0d failures=%0d", WS[w], c, lane_checks[w][c],
               lane_failures[w][c]);
    report(0);
    $finish;
  end
endmodule
