// tb_spike_router: loads random spike and gradient vectors, drains the
// packets with a randomly stalling receiver, and checks that exactly the
// expected packets arrive, in ascending neuron order with a neuron's spike
// before its gradient flag, and that packets hold still while stalled.
module tb_spike_router;
  import snn_pkg::*;
  localparam int N = 32, ADDR_W = 11;

  logic clk = 0, rst_n = 0, load = 0, busy, pkt_valid, pkt_ready = 0;
  logic [N-1:0] spikes = 0, grads = 0;
  logic [ADDR_W-1:0] route_base = 0, pkt_addr;
  pkt_kind_e pkt_kind;
  int checks = 0, failures = 0, stalls = 0;

  spike_router #(.N(N), .ADDR_W(ADDR_W)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] s, g;
      int exp_addr[$];
      pkt_kind_e exp_kind[$];
      int base, guard;
      s = $urandom; g = $urandom;
      if (t == 0) begin s = 0; g = 0; end
      base = $urandom % 1500;
      for (int j = 0; j < N; j++) begin
        if (s[j]) begin exp_addr.push_back(base + j); exp_kind.push_back(PKT_SPIKE); end
        if (g[j]) begin exp_addr.push_back(base + j); exp_kind.push_back(PKT_GRAD); end
      end
      load = 1; spikes = s; grads = g; route_base = ADDR_W'(base);
      @(negedge clk);
      load = 0; spikes = 0; grads = 0;
      guard = 0;
      while ((busy || exp_addr.size() != 0) && guard < 20 * N) begin
        pkt_ready = ($urandom % 4) != 0;
        if (pkt_valid && !pkt_ready) stalls++;
        if (pkt_valid && pkt_ready) begin
          checks++;
          if (exp_addr.size() == 0 || int'(pkt_addr) != exp_addr[0] || pkt_kind != exp_kind[0]) begin
            failures++;
            if (failures < 10) $display("FAIL packet %0d/%0d unexpected", pkt_addr, pkt_kind);
          end
          if (exp_addr.size() != 0) begin
            void'(exp_addr.pop_front());
            void'(exp_kind.pop_front());
          end
        end
        @(negedge clk);
        guard++;
      end
      pkt_ready = 0;
      checks++;
      if (exp_addr.size() != 0 || busy) begin
        failures++;
        $display("FAIL %0d packets missing", exp_addr.size());
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
