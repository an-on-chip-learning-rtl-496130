// write_scheduler: programs the changed bits of one crossbar row through two
// write drivers per 16-bit synapse.
//
// After a weight update the core knows the new row (wr_data) and which bits
// differ from the stored row (flip = w(n+1) XOR w(n)). To bound the write
// power the paper gives each 16-bit synapse only two write drivers, so a
// row write takes W_BITS/DRIVERS = 8 memory cycles. In memory cycle c
// (c = 0..7) the two drivers of every synapse are connected to bit lines
// 2c and 2c+1 of that synapse, and a driver is enabled only where that bit
// flips; bits that do not change are never programmed. The order of the
// bit pairs is this design's choice; the paper gives only the count.
//
// Interface: start (one logic cycle, while idle) latches row, data and flip
// mask. The block then drives wr_en/wr_row/wr_data/wr_mask of the array on
// eight successive mem_tick cycles and raises done for one logic cycle
// after the eighth. busy is high from start until done. A host write of a
// full row uses the same path with an all-ones flip mask.
module write_scheduler
  import snn_pkg::*;
#(
  parameter int unsigned COLS  = 2048,
  parameter int unsigned ROW_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mem_tick,
  input  logic             start,
  input  logic [ROW_W-1:0] row,
  input  logic [COLS-1:0]  data,
  input  logic [COLS-1:0]  flip,
  output logic             busy,
  output logic             done,
  output logic             wr_en,
  output logic [ROW_W-1:0] wr_row,
  output logic [COLS-1:0]  wr_data,
  output logic [COLS-1:0]  wr_mask
);

  localparam int unsigned CNT_W = $clog2(WRITE_CYCLES);

  logic [CNT_W-1:0] phase;
  logic [COLS-1:0]  flip_q;
  logic [COLS-1:0]  pair_sel;

  // bit lines served by the drivers in the current phase
  always_comb begin
    for (int c = 0; c < int'(COLS); c++)
      pair_sel[c] = ((c % W_BITS) / DRIVERS_PER_SYN) == int'(phase);
  end

  assign wr_en   = busy;
  assign wr_mask = flip_q & pair_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      phase   <= '0;
      wr_row  <= '0;
      wr_data <= '0;
      flip_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          phase   <= '0;
          wr_row  <= row;
          wr_data <= data;
          flip_q  <= flip;
        end
      end else if (mem_tick) begin
        if (phase == CNT_W'(WRITE_CYCLES - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        phase <= phase + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("write_scheduler: start while busy");

endmodule
