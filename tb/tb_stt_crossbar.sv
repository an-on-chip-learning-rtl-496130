// tb_stt_crossbar: checks the array model: a row written on a memory tick
// reads back, masked writes program only the enabled bits, nothing happens
// on non-tick cycles, and a read's data holds until the next read.
module tb_stt_crossbar;
  localparam int ROWS = 64, COLS = 96, ROW_W = 6;

  logic clk = 0, mem_tick = 0, rd_en = 0, wr_en = 0;
  logic [ROW_W-1:0] rd_row = 0, wr_row = 0;
  logic [COLS-1:0]  rd_data, wr_data = 0, wr_mask = 0;
  logic [COLS-1:0]  model [ROWS];
  int checks = 0, failures = 0;

  stt_crossbar #(.ROWS(ROWS), .COLS(COLS), .ROW_W(ROW_W)) dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] rnd_row();
    return {$urandom, $urandom, $urandom};
  endfunction

  task automatic write(int r, logic [COLS-1:0] d, logic [COLS-1:0] m, bit tick);
    @(negedge clk);
    wr_en = 1; wr_row = ROW_W'(r); wr_data = d; wr_mask = m; mem_tick = tick;
    @(negedge clk);
    wr_en = 0; mem_tick = 0;
    if (tick) model[r] = (model[r] & ~m) | (d & m);
  endtask

  task automatic read_check(int r);
    logic [COLS-1:0] exp;
    exp = model[r];
    @(negedge clk);
    rd_en = 1; rd_row = ROW_W'(r); mem_tick = 1;
    @(negedge clk);
    rd_en = 0; mem_tick = 0;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL row %0d read %h expected %h", r, rd_data, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) write(r, rnd_row(), '1, 1);
    for (int r = 0; r < ROWS; r++) read_check(r);
    // masked writes
    for (int i = 0; i < 200; i++) begin
      int r;
      r = $urandom % ROWS;
      write(r, rnd_row(), rnd_row(), 1);
    end
    // writes without a tick must not take effect
    for (int i = 0; i < 50; i++) write($urandom % ROWS, rnd_row(), '1, 0);
    for (int r = 0; r < ROWS; r++) read_check(r);
    // read data holds while other cycles pass
    read_check(5);
    repeat (7) @(negedge clk);
    checks++;
    if (rd_data !== model[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
