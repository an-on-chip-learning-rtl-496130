// tb_write_scheduler: checks that a row write is spread over exactly 8
// memory cycles, that in cycle c only bits 2c and 2c+1 of each 16-bit
// synapse can be driven, that only flipped bits are driven, and that the
// union of all driven bits equals the flip mask.
module tb_write_scheduler;
  localparam int COLS = 64, ROW_W = 5, DIV = 5;

  logic clk = 0, rst_n = 0, mem_tick, start = 0;
  logic [ROW_W-1:0] row = 0, wr_row;
  logic [COLS-1:0]  data = 0, flip = 0, wr_data, wr_mask, seen;
  logic busy, done, wr_en;
  int   div = 0;
  int   checks = 0, failures = 0;

  write_scheduler #(.COLS(COLS), .ROW_W(ROW_W)) dut (.*);

  always #1 clk = ~clk;
  assign mem_tick = (div == 0);
  always_ff @(posedge clk) div <= (div == DIV - 1) ? 0 : div + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int ticks, cycles, r;
      logic [COLS-1:0] d, f;
      d = {$urandom, $urandom};
      f = (t == 0) ? '1 : {$urandom, $urandom};
      r = $urandom % 32;
      repeat ($urandom % 7) @(negedge clk);
      start = 1; row = ROW_W'(r); data = d; flip = f;
      @(negedge clk);
      start = 0; data = ~d; flip = '0;        // inputs must have been latched
      ticks = 0; seen = '0; cycles = 0;
      while (!done) begin
        if (mem_tick && wr_en) begin
          chk(wr_row == ROW_W'(r) && wr_data == d, "row/data");
          for (int c = 0; c < COLS; c++)
            if (wr_mask[c]) chk(((c % 16) / 2) == ticks, "bit served in wrong cycle");
          chk((wr_mask & ~f) == '0, "unflipped bit driven");
          seen |= wr_mask;
          ticks++;
        end
        @(negedge clk);
        cycles++;
        if (cycles > 100) break;
      end
      chk(ticks == 8, $sformatf("write took %0d memory cycles", ticks));
      chk(seen == f, "not every flipped bit was written");
      chk(!busy, "busy after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
