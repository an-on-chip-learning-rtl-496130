// tb_snn_neuron: accumulates random weight sequences into one neuron and
// checks the membrane potential against a sequential FP16 reference, the
// spike rule v > theta and the gradient rule 0 <= v <= 2*theta, for several
// thresholds; also checks the boundary values v = theta and v = 2*theta.
module tb_snn_neuron;
  import fp16_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0;
  fp16_t w = 0, v;
  logic signed [4:0] theta_exp = 0;
  logic spike, grad;
  int checks = 0, failures = 0;

  snn_neuron dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(fp16_t ev, int te);
    real rv, th;
    logic es, eg;
    rv = to_real(ev);
    th = 2.0 ** te;
    es = rv > th;
    eg = (rv >= 0.0) && (rv <= 2.0 * th);
    checks++;
    if (v !== ev || spike !== es || grad !== eg) begin
      failures++;
      if (failures < 10) $display("FAIL v=%h (exp %h) spike=%b (%b) grad=%b (%b) theta=2^%0d",
                                  v, ev, spike, es, grad, eg, te);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      fp16_t ev;
      int n, te;
      te = int'($urandom % 5) - 2;
      theta_exp = 5'(te);
      clear = 1;
      @(negedge clk);
      clear = 0;
      ev = 16'h0000;
      n = $urandom % 25;
      for (int i = 0; i < n; i++) begin
        fp16_t rw;
        rw = rand_fp16(10, 16);
        w = rw; acc_en = 1;
        @(negedge clk);
        acc_en = 0;
        ev = add(ev, rw);
        check_state(ev, te);
      end
      // idle cycles keep v
      w = 16'h3C00;
      @(negedge clk);
      check_state(ev, te);
    end
    // exact boundaries with theta = 1
    theta_exp = 0;
    begin
      fp16_t vals[4];
      vals = '{16'h3C00, 16'h4000, 16'h4001, 16'h3BFF};
      foreach (vals[k]) begin
        clear = 1; @(negedge clk); clear = 0;
        w = vals[k]; acc_en = 1; @(negedge clk); acc_en = 0;
        check_state(vals[k], 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
