// Testbench for mantissa_truncation: random products of every bit length
// (and zero) with random exponents. For each the expected mantissa has its
// leading one at bit ACC_W-1, is P shifted left when P is short and P with
// its low bits dropped when P is long, and m * 2^e must equal P * 2^ex up to
// the dropped bits.
module tb_mantissa_truncation;
  localparam int W = 16, ACC_W = 24, XW = W + 6;
  logic sign_in, sign, zero;
  logic signed [XW-1:0] ex, e;
  logic [2*W-1:0] product;
  logic [ACC_W-1:0] m;
  int checks = 0, failures = 0;

  mantissa_truncation #(.REGISTER_WIDTH(W), .ACC_W(ACC_W)) dut (.sign_in, .ex, .product,
    .sign, .m, .e, .zero);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned p, xm;
    int bits, xe;
    for (int t = 0; t < 200; t++) begin
      bits = (t < 2 * W + 1) ? t : $urandom_range(2 * W, 0);   // bit length of P
      p = (bits == 0) ? 0 : ((64'd1 << (bits - 1)) | ({$urandom, $urandom} & ((64'd1 << (bits - 1)) - 1)));
      sign_in = 1'($urandom);
      ex = XW'($urandom_range(400, 0) - 200);
      product = (2*W)'(p);
      #1;
      if (bits == 0) begin
        check(zero && m == '0 && e == ex && sign == sign_in, "zero product");
      end else begin
        if (bits >= ACC_W) begin
          xm = p >> (bits - ACC_W);
          xe = int'(ex) + bits - ACC_W;
        end else begin
          xm = p << (ACC_W - bits);
          xe = int'(ex) - (ACC_W - bits);
        end
        check(!zero && sign == sign_in && 64'(m) == xm && int'(e) == xe,
              $sformatf("bits=%0d p=%0h got m=%0h e=%0d exp m=%0h e=%0d", bits, p, m, e, xm, xe));
        check(m[ACC_W-1] == 1'b1, "leading one at the top");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
