// tb_snn_inference_core: full-size test of the 256 x 256 inference core
// (32 neurons, 8-bit weights). Loads random signed weights into every row,
// reads some back, then runs time steps with random input spikes and
// checks every membrane potential against the integer sum of the weights
// of the spiking rows, every spike against v > theta, and that a step with
// N spiking rows takes N+1 clock cycles plus the fire cycle (one row per
// memory cycle, 32 synaptic operations each).
module tb_snn_inference_core;
  import snn_pkg::*;
  localparam int N_IN = 256, N = 32, WB = 8, VB = 16, ROW_W = 8;

  logic clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, done;
  core_cmd_e cmd = CMD_FORWARD;
  logic [ROW_W-1:0] cmd_row = 0;
  logic signed [VB-1:0] theta = 0;
  logic spikes_clear = 0, pkt_in_valid = 0;
  pkt_kind_e pkt_in_kind = PKT_SPIKE;
  logic [ROW_W-1:0] pkt_in_addr = 0;
  logic signed [VB-1:0] v_out [N];
  logic [N-1:0] spike_out;
  logic signed [WB-1:0] host_wr_data [N], host_rd_data [N];
  logic host_rd_valid;
  int checks = 0, failures = 0, fired = 0, quiet = 0;
  int W [N_IN][N];

  snn_inference_core dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  task automatic run_cmd(core_cmd_e c, int row, output int cycles);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_row = ROW_W'(row);
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    foreach (host_wr_data[j]) host_wr_data[j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_IN; i++) begin
      foreach (W[i][j]) begin
        W[i][j] = int'($urandom % 256) - 128;
        host_wr_data[j] = WB'(W[i][j]);
      end
      run_cmd(CMD_WRITE_ROW, i, cyc);
    end
    for (int k = 0; k < 10; k++) begin
      int r;
      bit ok;
      r = $urandom % N_IN;
      run_cmd(CMD_READ_ROW, r, cyc);
      @(negedge clk);
      ok = 1;
      foreach (host_rd_data[j]) if (int'(host_rd_data[j]) != W[r][j]) ok = 0;
      chk(ok, $sformatf("row %0d reads back wrong", r));
    end
    for (int t = 0; t < 20; t++) begin
      bit s [N_IN];
      int v [N], n_rows, density, th;
      density = (t == 0) ? 0 : int'($urandom % 30);
      th = int'($urandom % 400) - 100;
      theta = VB'(th);
      @(negedge clk);
      spikes_clear = 1;
      @(negedge clk);
      spikes_clear = 0;
      n_rows = 0;
      foreach (v[j]) v[j] = 0;
      for (int i = 0; i < N_IN; i++) begin
        s[i] = int'($urandom % 100) < density;
        if (s[i]) begin
          n_rows++;
          pkt_in_valid = 1; pkt_in_kind = PKT_SPIKE; pkt_in_addr = ROW_W'(i);
          @(negedge clk);
          pkt_in_valid = 0;
          foreach (v[j]) v[j] += W[i][j];
        end
      end
      run_cmd(CMD_FORWARD, 0, cyc);
      // issue cycle + one read per spiking row + end detect + fire
      chk(cyc == n_rows + 3, $sformatf("forward took %0d cycles for %0d rows", cyc, n_rows));
      @(negedge clk);
      foreach (v[j]) begin
        chk(int'(v_out[j]) == v[j], $sformatf("v[%0d]=%0d expected %0d", j, v_out[j], v[j]));
        chk(spike_out[j] == (v[j] > th), $sformatf("spike %0d", j));
        if (v[j] > th) fired++; else quiet++;
      end
    end
    chk(fired > 0 && quiet > 0, "spiking and silent neurons both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
