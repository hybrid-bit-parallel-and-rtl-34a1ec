// Testbench for psum_buffer: checks that reset clears every entry, then
// writes random partial sums and reads them back through both read ports.
module tb_psum_buffer;
  localparam int W = 16, ACC_W = 24, DEPTH = 16, XW = W + 6, AW = $clog2(DEPTH);
  logic clk = 1'b0, reset = 1'b1, we = 1'b0;
  logic [AW-1:0] waddr, raddr, hraddr;
  logic wsign, rsign, hsign;
  logic signed [XW-1:0] wexp, rexp, hexp;
  logic [ACC_W-1:0] wman, rman, hman;
  logic [XW+ACC_W:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  psum_buffer #(.REGISTER_WIDTH(W), .ACC_W(ACC_W), .DEPTH(DEPTH)) dut (.clk, .reset, .we,
    .waddr, .wsign, .wexp, .wman, .raddr, .rsign, .rexp, .rman, .host_raddr(hraddr),
    .host_rsign(hsign), .host_rexp(hexp), .host_rman(hman));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; raddr = '0; hraddr = '0; wsign = 0; wexp = '0; wman = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i); hraddr = AW'(DEPTH - 1 - i);
      #1;
      check({rsign, rexp, rman} == '0 && {hsign, hexp, hman} == '0, "cleared by reset");
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i);
      wsign = 1'($urandom); wexp = XW'($urandom); wman = ACC_W'($urandom);
      model[i] = {wsign, wexp, wman};
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 50; t++) begin
      int a, b;
      a = $urandom_range(DEPTH - 1, 0); b = $urandom_range(DEPTH - 1, 0);
      raddr = AW'(a); hraddr = AW'(b);
      #1;
      check({rsign, rexp, rman} == model[a], $sformatf("feedback read %0d", a));
      check({hsign, hexp, hman} == model[b], $sformatf("host read %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
