// tb_spike_decoder: sends random spike and gradient packets and checks the
// wordline maps against a reference, including clear and a packet that
// arrives in the same cycle as clear.
module tb_spike_decoder;
  import snn_pkg::*;
  localparam int N_IN = 200, ADDR_W = 8;

  logic clk = 0, rst_n = 0, clear = 0, pkt_valid = 0;
  pkt_kind_e pkt_kind = PKT_SPIKE;
  logic [ADDR_W-1:0] pkt_addr = 0;
  logic [N_IN-1:0] spike_map, grad_map, ref_s, ref_g;
  int checks = 0, failures = 0;

  spike_decoder #(.N_IN(N_IN), .ADDR_W(ADDR_W)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_s = '0; ref_g = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int a;
      clear = (t % 300 == 299);
      pkt_valid = ($urandom % 3) != 0;
      pkt_kind = pkt_kind_e'($urandom % 2);
      a = $urandom % N_IN;
      pkt_addr = ADDR_W'(a);
      @(negedge clk);
      if (clear) begin ref_s = '0; ref_g = '0; end
      if (pkt_valid && pkt_kind == PKT_SPIKE) ref_s[a] = 1'b1;
      if (pkt_valid && pkt_kind == PKT_GRAD)  ref_g[a] = 1'b1;
      checks++;
      if (spike_map !== ref_s || grad_map !== ref_g) begin
        failures++;
        if (failures < 5) $display("FAIL maps differ at step %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
