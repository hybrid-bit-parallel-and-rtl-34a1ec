// Testbench for sem_separator: known FP16 and BF16 encodings (1.0, -2.0, the
// largest normal, a subnormal, zero), signed and unsigned integers, and random
// words in random legal formats, each compared with fields cut out here with
// integer arithmetic.
module tb_sem_separator;
  import hybrid_pkg::*;
  localparam int W = 16;
  localparam int LW = $clog2(W + 1) + 1;
  logic [W-1:0] word, exp_o, man_o;
  fmt_t fmt;
  logic sign;
  logic [LW-1:0] man_len;
  int checks = 0, failures = 0;

  sem_separator #(.REGISTER_WIDTH(W)) dut (.word, .fmt, .sign, .exp(exp_o), .man(man_o), .man_len);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_fields(logic [W-1:0] w, fmt_t f, bit xs, int xe, int xm, int xl, string what);
    word = w; fmt = f;
    #1;
    check(sign == xs && int'(exp_o) == xe && int'(man_o) == xm && int'(man_len) == xl,
          $sformatf("%s: got s=%0d e=%0d m=%0h l=%0d", what, sign, exp_o, man_o, man_len));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fmt_t fp16, bf16, int8, uint4;
    fp16  = '{sign_en: 1'b1, exp_bits: 6'd5, man_bits: 6'd10};
    bf16  = '{sign_en: 1'b1, exp_bits: 6'd8, man_bits: 6'd7};
    int8  = '{sign_en: 1'b1, exp_bits: 6'd0, man_bits: 6'd7};
    uint4 = '{sign_en: 1'b0, exp_bits: 6'd0, man_bits: 6'd4};
    expect_fields(16'h3C00, fp16, 0, 15, 'h400, 11, "fp16 1.0");
    expect_fields(16'hC000, fp16, 1, 16, 'h400, 11, "fp16 -2.0");
    expect_fields(16'h7BFF, fp16, 0, 30, 'h7FF, 11, "fp16 max normal");
    expect_fields(16'h0001, fp16, 0, 1, 'h001, 11, "fp16 smallest subnormal");
    expect_fields(16'h0000, fp16, 0, 1, 'h000, 11, "fp16 zero");
    expect_fields(16'h3F80, bf16, 0, 127, 'h80, 8, "bf16 1.0");
    expect_fields(16'h0085, int8, 1, 0, 'h05, 7, "int8 -5");
    expect_fields(16'h007F, int8, 0, 0, 'h7F, 7, "int8 127");
    expect_fields(16'hFFF9, uint4, 0, 0, 'h9, 4, "uint4 9 with junk above");
    for (int t = 0; t < 300; t++) begin
      int mb, eb, se, xs, xe, xm, xl;
      logic [W-1:0] w;
      se = $urandom_range(1, 0);
      eb = $urandom_range(6, 0);
      mb = $urandom_range(W - se - eb, (eb == 0) ? 1 : 0);
      w = W'($urandom);
      fmt = '{sign_en: 1'(se), exp_bits: 6'(eb), man_bits: 6'(mb)};
      xm = int'(w) & ((1 << mb) - 1);
      xe = (int'(w) >> mb) & ((1 << eb) - 1);
      xs = se ? ((int'(w) >> (mb + eb)) & 1) : 0;
      if (eb == 0) begin
        xl = mb;
      end else begin
        xl = mb + 1;
        if (xe != 0) xm = xm + (1 << mb);
        else xe = 1;
      end
      expect_fields(w, fmt, 1'(xs), xe, xm, xl, $sformatf("random s%0d e%0d m%0d w=%0h", se, eb, mb, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
