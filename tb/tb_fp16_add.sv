// tb_fp16_add: checks the FP16 adder against the real-valued reference on
// directed corner cases (cancellation, carry-out, rounding ties, flush to
// zero, overflow, infinities) and on random operands.
module tb_fp16_add;
  import fp16_ref_pkg::*;

  fp16_t a, b, y;
  int checks = 0, failures = 0;

  fp16_add dut (.a(a), .b(b), .y(y));

  task automatic check(fp16_t ta, fp16_t tb_, fp16_t exp);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00, 16'h4000);     // 1 + 1 = 2
    check(16'h3C00, 16'hBC00, 16'h0000);     // 1 - 1 = +0
    check(16'h3C00, 16'h0000, 16'h3C00);     // 1 + 0
    check(16'h0000, 16'hC200, 16'hC200);     // 0 + -3
    check(16'h3C00, 16'h1000, add(16'h3C00, 16'h1000));  // far operand, sticky only
    check(16'h3C01, 16'h0C00, add(16'h3C01, 16'h0C00));
    check(16'h7BFF, 16'h7BFF, 16'h7C00);     // overflow to inf
    check(16'h7C00, 16'h3C00, 16'h7C00);     // inf + 1
    check(16'h0400, 16'h8401, 16'h8000);     // result below 2^-14 flushes
    check(16'h3C00, 16'h1400, add(16'h3C00, 16'h1400)); // 1 + 2^-10*... tie case
    check(16'h3C01, 16'h1400, add(16'h3C01, 16'h1400));
    for (int i = 0; i < 20000; i++) begin
      fp16_t ra, rb;
      ra = rand_fp16(1, 30);
      rb = (i % 3 == 0) ? rand_fp16(1, 30)
                        : {~ra[15] ^ i[0], 5'(int'(ra[14:10]) - int'(i % 5)), ra[9:0] ^ 10'($urandom % 8)};
      if (rb[14:10] == 5'd31) rb[14:10] = 5'd30;
      check(ra, rb, add(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
