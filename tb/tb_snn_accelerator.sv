// tb_snn_accelerator: end-to-end test of the whole accelerator with every
// parameter at its default. The first part runs the inference core: it
// loads all 256 rows with signed 8-bit weights and checks potentials,
// spikes and the N+3-cycle time step for random input spike sets. The
// second part tests the learning core at its full size (2048 inputs, 128 FP16 neurons, 2048 x 2048-bit array, memory clock
// = logic clock / 5).
//
// The testbench loads every row of the array with random FP16 weights
// through host row writes, then runs several time steps. Each step sends
// spike and gradient packets, runs a forward pass and compares every
// neuron's membrane potential, spike and gradient flag with a reference
// model (sequential FP16 sums in ascending row order), drains the router
// against a randomly stalling receiver and checks the packets, then runs a
// backward pass with a random, partly zero delta vector and checks every
// back-propagated delta_i (sequential FP16 MAC, times 1/(2*theta)) and the
// weights read back from every updated row and from untouched rows. The
// first step uses the per-core statistics of an MNIST training run (20
// input spikes, 95 non-zero input gradients). Cycle counts of the forward
// pass (one memory cycle per spiking row) and of the backward pass (per
// row, the longer of the MAC, nnz+1 logic cycles, and the 8-cycle write)
// are checked, and each mechanism is counted and must have occurred.
module tb_snn_accelerator;
  import snn_pkg::*;
  import fp16_ref_pkg::fp16_t;
  import fp16_ref_pkg::add;
  import fp16_ref_pkg::mul;
  import fp16_ref_pkg::scale;
  import fp16_ref_pkg::to_real;
  import fp16_ref_pkg::rand_fp16;

  localparam int N_IN = 2048, N = 128, ROW_W = 11, DIV = 5;
  localparam int STEPS = 3;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, done;
  core_cmd_e cmd = CMD_FORWARD;
  logic [ROW_W-1:0] cmd_row = 0;
  logic signed [4:0] theta_exp = 0;
  logic [4:0] lr_shift = 3;
  logic [ROW_W-1:0] route_base = 0;
  logic spikes_clear = 0, pkt_in_valid = 0;
  pkt_kind_e pkt_in_kind = PKT_SPIKE;
  logic [ROW_W-1:0] pkt_in_addr = 0;
  logic pkt_out_valid, pkt_out_ready = 0;
  pkt_kind_e pkt_out_kind;
  logic [ROW_W-1:0] pkt_out_addr;
  fp16_t v_out [N];
  logic [N-1:0] spike_out, grad_out;
  fp16_t delta_in [N];
  logic delta_out_valid;
  logic [ROW_W-1:0] delta_out_row;
  fp16_t delta_out;
  fp16_t host_wr_data [N];
  logic host_rd_valid;
  fp16_t host_rd_data [N];

  // inference core side
  localparam int IC_N_IN = 256, IC_N = 32, IC_ROW_W = 8;
  logic ic_clk = 0, ic_cmd_valid = 0, ic_cmd_ready, ic_done;
  core_cmd_e ic_cmd = CMD_FORWARD;
  logic [IC_ROW_W-1:0] ic_cmd_row = 0;
  logic signed [15:0] ic_theta = 0;
  logic ic_spikes_clear = 0, ic_pkt_in_valid = 0;
  pkt_kind_e ic_pkt_in_kind = PKT_SPIKE;
  logic [IC_ROW_W-1:0] ic_pkt_in_addr = 0;
  logic signed [15:0] ic_v_out [IC_N];
  logic [IC_N-1:0] ic_spike_out;
  logic signed [7:0] ic_host_wr_data [IC_N], ic_host_rd_data [IC_N];
  logic ic_host_rd_valid;
  int IW [IC_N_IN][IC_N];
  int n_ic_fired = 0, n_ic_quiet = 0, n_ic_steps = 0;

  snn_accelerator dut (
    .rst_n, .lc_clk(clk), .ic_clk(ic_clk),
    .lc_cmd_valid(cmd_valid),
    .lc_cmd_ready(cmd_ready),
    .lc_cmd(cmd),
    .lc_cmd_row(cmd_row),
    .lc_done(done),
    .lc_theta_exp(theta_exp),
    .lc_lr_shift(lr_shift),
    .lc_route_base(route_base),
    .lc_spikes_clear(spikes_clear),
    .lc_pkt_in_valid(pkt_in_valid),
    .lc_pkt_in_kind(pkt_in_kind),
    .lc_pkt_in_addr(pkt_in_addr),
    .lc_pkt_out_valid(pkt_out_valid),
    .lc_pkt_out_ready(pkt_out_ready),
    .lc_pkt_out_kind(pkt_out_kind),
    .lc_pkt_out_addr(pkt_out_addr),
    .lc_v_out(v_out),
    .lc_spike_out(spike_out),
    .lc_grad_out(grad_out),
    .lc_delta_in(delta_in),
    .lc_delta_out_valid(delta_out_valid),
    .lc_delta_out_row(delta_out_row),
    .lc_delta_out(delta_out),
    .lc_host_wr_data(host_wr_data),
    .lc_host_rd_valid(host_rd_valid),
    .lc_host_rd_data(host_rd_data),
    .ic_cmd_valid(ic_cmd_valid),
    .ic_cmd_ready(ic_cmd_ready),
    .ic_cmd(ic_cmd),
    .ic_cmd_row(ic_cmd_row),
    .ic_done(ic_done),
    .ic_theta(ic_theta),
    .ic_spikes_clear(ic_spikes_clear),
    .ic_pkt_in_valid(ic_pkt_in_valid),
    .ic_pkt_in_kind(ic_pkt_in_kind),
    .ic_pkt_in_addr(ic_pkt_in_addr),
    .ic_v_out(ic_v_out),
    .ic_spike_out(ic_spike_out),
    .ic_host_wr_data(ic_host_wr_data),
    .ic_host_rd_valid(ic_host_rd_valid),
    .ic_host_rd_data(ic_host_rd_data)
  );

  always #5 ic_clk = ~ic_clk;      // memory clock of the inference core, 1/5 of clk

  task automatic ic_cmd_run(core_cmd_e c, int row, output int cycles);
    @(negedge ic_clk);
    while (!ic_cmd_ready) @(negedge ic_clk);
    ic_cmd_valid = 1; ic_cmd = c; ic_cmd_row = IC_ROW_W'(row);
    @(negedge ic_clk);
    ic_cmd_valid = 0;
    cycles = 1;
    while (!ic_done) begin @(negedge ic_clk); cycles++; end
  endtask

  task automatic ic_test();
    int cyc;
    for (int i = 0; i < IC_N_IN; i++) begin
      foreach (IW[i][j]) begin
        IW[i][j] = int'($urandom % 256) - 128;
        ic_host_wr_data[j] = 8'(IW[i][j]);
      end
      ic_cmd_run(CMD_WRITE_ROW, i, cyc);
    end
    for (int k = 0; k < 4; k++) begin
      int r;
      bit ok;
      r = $urandom % IC_N_IN;
      ic_cmd_run(CMD_READ_ROW, r, cyc);
      @(negedge ic_clk);
      ok = 1;
      foreach (ic_host_rd_data[j]) if (int'(ic_host_rd_data[j]) != IW[r][j]) ok = 0;
      chk(ok, $sformatf("inference row %0d reads back wrong", r));
    end
    for (int t = 0; t < 6; t++) begin
      int v [IC_N], n_rows, th;
      th = int'($urandom % 300) - 100;
      ic_theta = 16'(th);
      @(negedge ic_clk);
      ic_spikes_clear = 1;
      @(negedge ic_clk);
      ic_spikes_clear = 0;
      n_rows = 0;
      foreach (v[j]) v[j] = 0;
      for (int i = 0; i < IC_N_IN; i++) begin
        if (int'($urandom % 100) < 8) begin
          n_rows++;
          ic_pkt_in_valid = 1; ic_pkt_in_kind = PKT_SPIKE; ic_pkt_in_addr = IC_ROW_W'(i);
          @(negedge ic_clk);
          ic_pkt_in_valid = 0;
          foreach (v[j]) v[j] += IW[i][j];
        end
      end
      ic_cmd_run(CMD_FORWARD, 0, cyc);
      n_ic_steps++;
      chk(cyc == n_rows + 3, $sformatf("inference step took %0d cycles for %0d rows", cyc, n_rows));
      @(negedge ic_clk);
      foreach (v[j]) begin
        chk(int'(ic_v_out[j]) == v[j] && ic_spike_out[j] == (v[j] > th),
            $sformatf("inference neuron %0d: v=%0d expected %0d", j, ic_v_out[j], v[j]));
        if (v[j] > th) n_ic_fired++; else n_ic_quiet++;
      end
    end
  endtask

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  fp16_t W [N_IN][N];

  // mechanism counters
  int n_host_wr = 0, n_host_rd = 0, n_fwd_rows = 0, n_fired = 0, n_gflag = 0;
  int n_mac_rows = 0, n_mac_skip = 0, n_write_rows = 0, n_write_only = 0, n_mac_only = 0;
  int n_both = 0, n_bits_flipped = 0, n_syn_unchanged = 0, n_router_stall = 0;
  int n_pkts = 0, n_delta_out = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic run_cmd(core_cmd_e c, int row);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_row = ROW_W'(row);
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic write_row(int r);
    foreach (host_wr_data[j]) host_wr_data[j] = W[r][j];
    run_cmd(CMD_WRITE_ROW, r);
    n_host_wr++;
  endtask

  task automatic check_row(int r, string what);
    bit ok;
    run_cmd(CMD_READ_ROW, r);
    @(negedge clk);
    n_host_rd++;
    ok = 1;
    foreach (host_rd_data[j]) if (host_rd_data[j] !== W[r][j]) ok = 0;
    chk(ok, $sformatf("%s: row %0d reads back wrong", what, r));
  endtask

  task automatic send(pkt_kind_e k, int a);
    @(negedge clk);
    pkt_in_valid = 1; pkt_in_kind = k; pkt_in_addr = ROW_W'(a);
    @(negedge clk);
    pkt_in_valid = 0;
  endtask

  // one time step: n_s input spikes, n_g input gradient flags
  task automatic time_step(int n_s, int n_g, int te, int lr);
    bit s [N_IN], g [N_IN];
    fp16_t v [N], dl [N];
    int t0, t1, cyc, rows_f, exp_min, exp_max, nnz, mac_total, array_total;
    bit exp_a [N], exp_g [N];
    int pk_addr[$];
    pkt_kind_e pk_kind[$];
    fp16_t exp_delta [N_IN];
    int got_rows[$];
    fp16_t got_vals[$];

    theta_exp = 5'(te);
    lr_shift  = 5'(lr);
    route_base = ROW_W'($urandom % 1024);
    foreach (s[i]) begin s[i] = 0; g[i] = 0; end
    for (int k = 0; k < n_s; k++) begin
      int r = $urandom % N_IN;
      s[r] = 1;
      if (k % 4 == 0) g[r] = 1;              // some rows get both
    end
    for (int k = 0; k < n_g; k++) g[$urandom % N_IN] = 1;
    @(negedge clk);
    spikes_clear = 1;
    @(negedge clk);
    spikes_clear = 0;
    for (int i = N_IN - 1; i >= 0; i--) begin   // any order: the decoder keeps a map
      if (s[i]) send(PKT_SPIKE, i);
      if (g[i]) send(PKT_GRAD, i);
    end

    // ---------------- forward pass ----------------
    foreach (v[j]) v[j] = 16'h0000;
    rows_f = 0;
    for (int i = 0; i < N_IN; i++) if (s[i]) begin
      rows_f++;
      foreach (v[j]) v[j] = add(v[j], W[i][j]);
    end
    t0 = $time;
    run_cmd(CMD_FORWARD, 0);
    t1 = $time;
    cyc = (t1 - t0) / 2;
    n_fwd_rows += rows_f;
    $display("time step: %0d spiking rows, forward pass %0d logic cycles (%0d memory cycles)",
             rows_f, cyc, (cyc + DIV - 1) / DIV);
    // one memory cycle per spiking row plus one to find the end (+ handshake)
    chk(cyc >= rows_f * DIV + 1 && cyc <= (rows_f + 2) * DIV + 4,
        $sformatf("forward pass took %0d cycles for %0d rows", cyc, rows_f));
    @(negedge clk);
    foreach (v[j]) begin
      real rv, th;
      rv = to_real(v[j]);
      th = 2.0 ** te;
      exp_a[j] = rv > th;
      exp_g[j] = rv >= 0.0 && rv <= 2.0 * th;
      chk(v_out[j] === v[j], $sformatf("v[%0d]=%h expected %h", j, v_out[j], v[j]));
      chk(spike_out[j] === exp_a[j] && grad_out[j] === exp_g[j], $sformatf("a/g of neuron %0d", j));
      n_fired += exp_a[j];
      n_gflag += exp_g[j];
      if (exp_a[j]) begin pk_addr.push_back(int'(route_base) + j); pk_kind.push_back(PKT_SPIKE); end
      if (exp_g[j]) begin pk_addr.push_back(int'(route_base) + j); pk_kind.push_back(PKT_GRAD); end
    end

    // ---------------- router output ----------------
    begin
      int guard = 0;
      while ((pkt_out_valid || pk_addr.size() != 0) && guard < 20 * N) begin
        pkt_out_ready = ($urandom % 3) != 0;
        if (pkt_out_valid && !pkt_out_ready) n_router_stall++;
        if (pkt_out_valid && pkt_out_ready) begin
          n_pkts++;
          chk(pk_addr.size() != 0 && int'(pkt_out_addr) == (pk_addr[0] % N_IN) && pkt_out_kind == pk_kind[0],
              $sformatf("router packet %0d kind %0d", pkt_out_addr, pkt_out_kind));
          if (pk_addr.size() != 0) begin void'(pk_addr.pop_front()); void'(pk_kind.pop_front()); end
        end
        @(negedge clk);
        guard++;
      end
      pkt_out_ready = 0;
      chk(pk_addr.size() == 0, "router lost packets");
    end

    // ---------------- backward pass ----------------
    nnz = 0;
    foreach (dl[j]) begin
      dl[j] = (($urandom % 100) < 47) ? rand_fp16(10, 15) : 16'h0000;
      if (dl[j][14:10] != 0) nnz++;
      delta_in[j] = dl[j];
    end
    if (nnz == N) begin dl[0] = 16'h0000; delta_in[0] = 16'h0000; nnz--; end
    exp_min = 0; exp_max = 0; mac_total = 0; array_total = 0;
    for (int i = 0; i < N_IN; i++) begin
      int m_cyc, w_cyc, row_cyc;
      if (!(s[i] || g[i])) continue;
      m_cyc = 0; w_cyc = 0;
      if (g[i]) begin
        fp16_t acc = 16'h0000;
        foreach (dl[j]) if (dl[j][14:10] != 0) acc = add(acc, mul(W[i][j], dl[j]));
        exp_delta[i] = scale(acc, te + 1);
        n_mac_rows++;
        n_mac_skip += N - nnz;
        m_cyc = nnz + 1;                      // logic cycles of the MAC
      end
      if (s[i]) begin
        fp16_t old;
        w_cyc = 8 * DIV;                      // 8 memory cycles, two bits per synapse each
        n_write_rows++;
        foreach (dl[j]) begin
          old = W[i][j];
          W[i][j] = add(old, scale(dl[j], lr));
          n_bits_flipped += $countones(old ^ W[i][j]);
          if (old == W[i][j]) n_syn_unchanged++;
        end
      end
      if (s[i] && g[i]) n_both++;
      else if (s[i]) n_write_only++;
      else n_mac_only++;
      // sequential bound: a read, then the longer of MAC and write
      row_cyc = DIV + ((m_cyc > w_cyc) ? m_cyc : w_cyc);
      exp_max += row_cyc + 2 * DIV;
      mac_total += m_cyc;
      array_total += DIV + w_cyc;
    end
    // the pipelined core can be no faster than its MAC or its array
    exp_min = (mac_total > array_total - DIV) ? mac_total : array_total - DIV;
    fork
      begin
        t0 = $time;
        run_cmd(CMD_BACKWARD, 0);
        t1 = $time;
      end
      begin
        forever begin
          @(posedge clk);
          if (delta_out_valid) begin
            got_rows.push_back(int'(delta_out_row));
            got_vals.push_back(delta_out);
          end
        end
      end
    join_any
    disable fork;
    cyc = (t1 - t0) / 2;
    $display("           backward pass %0d logic cycles (%0d memory cycles), %0d non-zero deltas; MAC needs %0d, array %0d logic cycles",
             cyc, (cyc + DIV - 1) / DIV, nnz, mac_total, array_total);
    chk(cyc >= exp_min && cyc <= exp_max + 4 * DIV,
        $sformatf("backward pass took %0d cycles, expected %0d..%0d", cyc, exp_min, exp_max));
    begin
      int k = 0;
      for (int i = 0; i < N_IN; i++) if (g[i]) begin
        chk(k < got_rows.size() && got_rows[k] == i && got_vals[k] === exp_delta[i],
            $sformatf("delta out for row %0d: got %h expected %h", i,
                      (k < got_vals.size()) ? got_vals[k] : 16'hDEAD, exp_delta[i]));
        k++;
        n_delta_out++;
      end
      chk(k == got_rows.size(), "extra delta outputs");
    end
    // weights of every updated row, and a few other rows
    for (int i = 0; i < N_IN; i++) if (s[i]) check_row(i, "updated");
    for (int k = 0; k < 4; k++) check_row($urandom % N_IN, "other");
  endtask

  initial begin
    foreach (delta_in[j]) delta_in[j] = 16'h0000;
    foreach (host_wr_data[j]) host_wr_data[j] = 16'h0000;
    foreach (ic_host_wr_data[j]) ic_host_wr_data[j] = 0;
    repeat (4) @(negedge ic_clk);
    rst_n = 1;
    ic_test();
    // random weights in about [-2, 2]
    for (int i = 0; i < N_IN; i++) begin
      foreach (W[i][j]) W[i][j] = rand_fp16(11, 15);
      write_row(i);
    end
    for (int k = 0; k < 8; k++) check_row($urandom % N_IN, "loaded");

    time_step(20, 95, 0, 3);     // MNIST statistics per layer per core
    time_step(6, 30, 1, 5);
    time_step(0, 10, -1, 2);     // no input spike: nothing written

    $display("mechanisms: host_wr=%0d host_rd=%0d fwd_rows=%0d fired=%0d gflags=%0d mac_rows=%0d mac_skipped=%0d",
             n_host_wr, n_host_rd, n_fwd_rows, n_fired, n_gflag, n_mac_rows, n_mac_skip);
    $display("            write_rows=%0d write_only=%0d mac_only=%0d both=%0d bits_flipped=%0d syn_unchanged=%0d",
             n_write_rows, n_write_only, n_mac_only, n_both, n_bits_flipped, n_syn_unchanged);
    $display("            router_stalls=%0d packets=%0d delta_out=%0d", n_router_stall, n_pkts, n_delta_out);
    $display("            inference: steps=%0d fired=%0d silent=%0d", n_ic_steps, n_ic_fired, n_ic_quiet);
    chk(n_ic_fired > 0 && n_ic_quiet > 0, "inference core: no spiking or no silent neuron");
    chk(n_host_wr > 0, "no host write");
    chk(n_host_rd > 0, "no host read");
    chk(n_fwd_rows > 0, "no forward accumulation");
    chk(n_fired > 0, "no neuron fired");
    chk(n_gflag > 0, "no gradient flag");
    chk(n_mac_rows > 0, "no MAC row");
    chk(n_mac_skip > 0, "no zero delta skipped");
    chk(n_write_only > 0, "no write-only row");
    chk(n_mac_only > 0, "no MAC-only row");
    chk(n_both > 0, "no row with both");
    chk(n_bits_flipped > 0, "no bit flipped");
    chk(n_syn_unchanged > 0, "no synapse left unchanged");
    chk(n_router_stall > 0, "no router stall");
    chk(n_delta_out > 0, "no delta output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
