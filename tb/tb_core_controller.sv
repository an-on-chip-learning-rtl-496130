// tb_core_controller: drives the controller with random spike and gradient
// maps and simple MAC / write-scheduler stand-ins of random duration, and
// checks the sequence it produces: forward reads exactly the spiking rows,
// one per memory tick, in ascending order, each followed by a neuron
// accumulate, then one fire; backward reads every row with a spike or flag,
// starts the MAC only for flagged rows and the write only for spiking rows,
// never reads while a write is in progress, never restarts a busy MAC,
// and reports delta for flagged rows in order; host commands read
// and write the requested row. It also checks the forward pass length of
// N+1 memory cycles.
module tb_core_controller;
  import snn_pkg::*;
  localparam int N_IN = 64, DIV = 5, ROW_W = 6;

  logic clk = 0, rst_n = 0, mem_tick, cmd_valid = 0, cmd_ready, done;
  core_cmd_e cmd = CMD_FORWARD;
  logic [ROW_W-1:0] cmd_row = 0, rd_row, ws_row, delta_row;
  logic [N_IN-1:0] spike_map = 0, grad_map = 0;
  logic rd_en, neuron_clear, neuron_acc, fire, router_busy = 0;
  logic delta_latch, wu_en, mac_start, mac_busy, mac_done = 0, ws_start, ws_host, ws_busy;
  logic delta_valid, host_rd_valid;
  int checks = 0, failures = 0;
  int mac_left = 0, ws_left = 0;

  core_controller #(.N_IN(N_IN), .MEM_DIV(DIV), .ROW_W(ROW_W)) dut (.*);

  always #1 clk = ~clk;

  // stand-ins: MAC busy for a random number of cycles, writes for 8 ticks
  assign mac_busy = mac_left > 0;
  assign ws_busy  = ws_left > 0;
  always_ff @(posedge clk) begin
    mac_done <= (mac_left == 1);
    if (mac_start) mac_left <= 1 + int'($urandom % 40);
    else if (mac_left > 0) mac_left <= mac_left - 1;
    if (ws_start) ws_left <= 8 * DIV;
    else if (ws_left > 0) ws_left <= ws_left - 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 15) $display("FAIL %s", msg);
    end
  endtask

  task automatic issue(core_cmd_e c, int row);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_row = ROW_W'(row);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // observed events
  int reads[$], hwrites[$], accs, fires, macs[$], writes[$], deltas[$], ticks_fwd;
  logic last_tick_read;
  always @(posedge clk) if (rst_n) begin
    if (mac_start || (ws_start && !ws_host)) chk(reads.size() > 0 && int'(ws_row) == reads[$], "op on a row not just read");
    if (rd_en && mem_tick) reads.push_back(int'(rd_row));
    if (neuron_acc) accs++;
    if (fire) fires++;
    if (mac_start) macs.push_back(int'(ws_row));
    if (ws_start && !ws_host) writes.push_back(int'(ws_row));
    if (ws_start && ws_host) hwrites.push_back(int'(ws_row));
    if (delta_valid) deltas.push_back(int'(delta_row));
    if (mem_tick) ticks_fwd++;
    if (rd_en && mem_tick) chk(!ws_busy, "row read while the array is being written");
    if (mac_start) chk(!mac_busy, "MAC started while busy");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      logic [N_IN-1:0] s, g;
      int exp_r[$], exp_m[$], exp_w[$];
      s = {$urandom, $urandom} & {$urandom, $urandom};
      g = {$urandom, $urandom} & {$urandom, $urandom};
      if (t == 0) begin s = 0; g = 0; end
      spike_map = s; grad_map = g;
      // forward
      reads.delete(); accs = 0; fires = 0;
      issue(CMD_FORWARD, 0);
      ticks_fwd = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      exp_r.delete();
      for (int i = 0; i < N_IN; i++) if (s[i]) exp_r.push_back(i);
      chk(reads == exp_r, "forward rows");
      chk(accs == exp_r.size(), "forward accumulates");
      chk(fires == 1, "one fire per forward pass");
      chk(ticks_fwd >= exp_r.size() + 1 && ticks_fwd <= exp_r.size() + 3,
          $sformatf("forward took %0d memory cycles for %0d rows", ticks_fwd, exp_r.size()));
      // backward
      reads.delete(); macs.delete(); writes.delete(); deltas.delete();
      issue(CMD_BACKWARD, 0);
      while (!done) @(negedge clk);
      @(negedge clk);
      exp_r.delete(); exp_m.delete(); exp_w.delete();
      for (int i = 0; i < N_IN; i++) begin
        if (s[i] || g[i]) exp_r.push_back(i);
        if (g[i]) exp_m.push_back(i);
        if (s[i]) exp_w.push_back(i);
      end
      chk(reads == exp_r, "backward rows");
      chk(macs == exp_m, "MAC rows");
      chk(writes == exp_w, "written rows");
      chk(deltas == exp_m, "delta rows");
      // host access
      begin
        int r;
        r = $urandom % N_IN;
        reads.delete(); hwrites.delete();
        issue(CMD_WRITE_ROW, r);
        while (!done) @(negedge clk);
        chk(hwrites.size() == 1 && hwrites[0] == r && reads.size() == 0, "host write row");
        issue(CMD_READ_ROW, r);
        while (!host_rd_valid) @(negedge clk);
        chk(reads.size() == 1 && reads[0] == r, "host read row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
