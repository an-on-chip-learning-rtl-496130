// tb_fp16_mul: checks the FP16 multiplier against the real-valued reference
// on corner cases (zero, infinity, overflow, underflow) and random operands.
module tb_fp16_mul;
  import fp16_ref_pkg::*;

  fp16_t a, b, y;
  int checks = 0, failures = 0;

  fp16_mul dut (.a(a), .b(b), .y(y));

  task automatic check(fp16_t ta, fp16_t tb_, fp16_t exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h4000, 16'h4200, 16'h4600);     // 2 * 3 = 6
    check(16'hBC00, 16'h3C00, 16'hBC00);     // -1 * 1
    check(16'h0000, 16'h4200, 16'h0000);
    check(16'h7C00, 16'h0000, 16'h7E00);     // inf * 0 = NaN
    check(16'h7800, 16'h7800, 16'h7C00);     // overflow
    check(16'h0400, 16'h3800, 16'h0000);     // 2^-14 * 0.5 flushes
    for (int i = 0; i < 20000; i++) begin
      fp16_t ra, rb;
      ra = rand_fp16(1, 30);
      rb = rand_fp16(1, 30);
      check(ra, rb, mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
