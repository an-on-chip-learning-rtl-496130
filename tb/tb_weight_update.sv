// tb_weight_update: checks w_new = w + 2^-b * delta and flip = w_new ^ w
// against the reference for random weights, errors and learning rates, and
// that with en low the weight is unchanged and nothing flips.
module tb_weight_update;
  import fp16_ref_pkg::*;

  logic  en;
  fp16_t w_old, delta, w_new, flip;
  logic [4:0] lr_shift;
  int checks = 0, failures = 0;

  weight_update dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      fp16_t ew;
      en = (i % 10) != 0;
      w_old = rand_fp16(8, 17);
      delta = (i % 7 == 0) ? 16'h0000 : rand_fp16(8, 22);
      lr_shift = 5'($urandom % 12);
      #1;
      ew = en ? add(w_old, scale(delta, int'(lr_shift))) : w_old;
      checks++;
      if (w_new !== ew || flip !== (ew ^ w_old)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%h d=%h b=%0d en=%b: new=%h exp=%h flip=%h",
                                    w_old, delta, lr_shift, en, w_new, ew, flip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
