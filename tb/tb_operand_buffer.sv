// Testbench for operand_buffer: fills all entries with random words, reads
// them back in random order through the combinational read port, then
// overwrites some entries and checks that only those changed.
module tb_operand_buffer;
  localparam int WIDTH = 16, DEPTH = 16, AW = $clog2(DEPTH);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  operand_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic write(int a, logic [WIDTH-1:0] d);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[a] = d;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) write(i, WIDTH'($urandom));
    for (int r = 0; r < 3; r++) begin
      for (int t = 0; t < 40; t++) begin
        int a;
        a = $urandom_range(DEPTH - 1, 0);
        raddr = AW'(a);
        #1;
        check(rdata == model[a], $sformatf("read %0d", a));
      end
      for (int t = 0; t < 4; t++) write($urandom_range(DEPTH - 1, 0), WIDTH'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
