// tb_mac_unit: checks delta_i = 1/(2*theta) * sum_j w_j * delta_j against a
// sequential FP16 reference (ascending j, zero deltas skipped, rounding at
// every step), and that the unit takes nnz+1 cycles, nnz being the number
// of non-zero deltas, from start to done.
module tb_mac_unit;
  import fp16_ref_pkg::*;
  localparam int N = 16;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp16_t w [N], delta [N], result;
  logic signed [4:0] theta_exp = 0;
  int checks = 0, failures = 0;

  mac_unit #(.N(N)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (w[j]) begin w[j] = 0; delta[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      fp16_t acc, exp_r;
      int nnz, cyc, te, density;
      te = int'($urandom % 4) - 1;
      density = (t % 50 == 0) ? 0 : int'($urandom % 100);
      nnz = 0;
      acc = 16'h0000;
      foreach (w[j]) begin
        w[j] = rand_fp16(10, 17);
        delta[j] = (int'($urandom % 100) < density) ? rand_fp16(8, 16) : 16'h0000;
        if (delta[j][14:10] != 0) begin
          nnz++;
          acc = add(acc, mul(w[j], delta[j]));
        end
      end
      exp_r = scale(acc, te + 1);
      theta_exp = 5'(te);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (w[j]) begin w[j] = 16'hFFFF; delta[j] = 16'h3C00; end  // latched already
      cyc = 0;
      while (!done && cyc < 10 * N) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (result !== exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL result %h expected %h (nnz %0d)", result, exp_r, nnz);
      end
      checks++;
      if (cyc != nnz + 1) begin
        failures++;
        if (failures < 10) $display("FAIL took %0d cycles for nnz=%0d", cyc, nnz);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
