// stt_crossbar: behavioural model of the STT-RAM crossbar array with its
// sense amplifiers and write drivers.
//
// The real part is an analog macro: ROWS x COLS one-transistor/one-MTJ bit
// cells, current-mode sense amplifiers on every bitline and write drivers
// that program selected cells. This model keeps the digital behaviour of
// that macro: each bit cell holds one bit (the paper stores '1' as the
// high-resistance state and '0' as the low-resistance state; only the
// logical bit is modelled), a read senses a whole wordline, and a write
// programs only the bitlines whose driver is enabled.
//
// Timing: the array works on the memory clock, which is the logic clock
// divided by MEM_DIV (100 MHz against 500 MHz in the paper). mem_tick
// marks the one logic cycle in each memory cycle on which a command is
// accepted. A read (rd_en at a tick) loads rd_data at that clock edge; it
// then stays stable until the next read, i.e. the sensed row is available
// for the whole memory cycle, matching a 5 ns read inside a 10 ns memory
// period. A write (wr_en at a tick) programs wr_data into the bits selected
// by wr_mask, again in one memory cycle; the 7 ns STT-RAM write pulse fits
// in that period. Read and write in the same tick are not allowed. The
// storage is a plain array, so the model is also synthesizable.
module stt_crossbar #(
  parameter int unsigned ROWS  = 2048,
  parameter int unsigned COLS  = 2048,
  parameter int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             mem_tick,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output logic [COLS-1:0]  rd_data,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [COLS-1:0]  wr_data,
  input  logic [COLS-1:0]  wr_mask
);

  logic [COLS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    if (mem_tick && rd_en) rd_data <= cells[rd_row];
    if (mem_tick && wr_en) cells[wr_row] <= (cells[wr_row] & ~wr_mask) | (wr_data & wr_mask);
  end

  // one wordline operation per memory cycle
  assert property (@(posedge clk) !(mem_tick && rd_en && wr_en))
    else $error("stt_crossbar: read and write in the same memory cycle");

endmodule
