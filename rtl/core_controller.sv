// core_controller: sequences the learning core through its forward pass,
// back-propagation and weight update, and through host row reads/writes.
//
// Memory clock: a free-running divider makes mem_tick high on one logic
// cycle out of MEM_DIV (the paper runs the logic at 500 MHz and the
// STT-RAM array at 100 MHz, MEM_DIV = 5). Every array command is issued on
// a tick.
//
// Forward pass (CMD_FORWARD): the neurons' potentials are cleared, then the
// wordlines whose input spiked (spike_map) are read one per memory cycle,
// in ascending order; in the logic cycle after each read every neuron adds
// its weight from the sensed row. When no spiking row is left the neurons
// fire: fire pulses, the core latches a^k and g^k and loads the router.
// A pass over N spiking rows takes N+1 memory cycles plus the fire cycle.
//
// Backward pass (CMD_BACKWARD): delta^k is latched (delta_latch), then every
// wordline i that received a spike or a gradient flag is handled in
// ascending order. Its row is read on a tick. As soon as the MAC is free,
// the MAC is started if g_i is set (delta_i^(k-1), Eq. 6) and the write
// scheduler is started if a_i is set (weights w + 2^-b*delta, only flipped
// bits programmed); both take their operands from the sensed row. The next
// row is read on the next tick at which the array is not being written, so
// the MAC of one row overlaps the write of that row and the read of the
// next one. The paper runs MAC and write in parallel and counts the
// backward time as the longer of the two; the read-ahead of the next row is
// this design's way of keeping the MAC busy. Each MAC result leaves on
// delta_valid/delta_row (= mac_done and the row it belongs to). done
// pulses once the last MAC and write have finished.
//
// Host access: CMD_WRITE_ROW programs a whole row (all bits flagged, so
// it also takes 8 memory cycles through the write drivers); CMD_READ_ROW
// reads a row and pulses host_rd_valid when rd_data holds it.
//
// Handshake: a command is taken when cmd_valid and cmd_ready are high;
// cmd_ready is high only while idle. done pulses for one cycle when the
// command has finished.
module core_controller
  import snn_pkg::*;
#(
  parameter int unsigned N_IN    = 2048,
  parameter int unsigned MEM_DIV = 5,
  parameter int unsigned ROW_W   = $clog2(N_IN)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             mem_tick,
  // commands
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  core_cmd_e        cmd,
  input  logic [ROW_W-1:0] cmd_row,
  output logic             done,
  // rows that received input
  input  logic [N_IN-1:0]  spike_map,
  input  logic [N_IN-1:0]  grad_map,
  // crossbar read port
  output logic             rd_en,
  output logic [ROW_W-1:0] rd_row,
  // neurons and output
  output logic             neuron_clear,
  output logic             neuron_acc,
  output logic             fire,
  input  logic             router_busy,
  // back-propagation and weight update
  output logic             delta_latch,
  output logic             wu_en,
  output logic             mac_start,
  input  logic             mac_busy,
  input  logic             mac_done,
  output logic             ws_start,
  output logic             ws_host,
  output logic [ROW_W-1:0] ws_row,
  input  logic             ws_busy,
  output logic             delta_valid,
  output logic [ROW_W-1:0] delta_row,
  output logic             host_rd_valid
);

  typedef enum logic [3:0] {
    S_IDLE, S_F_ISSUE, S_F_FIRE, S_B_ISSUE, S_B_OPS, S_B_DRAIN,
    S_H_WRITE, S_H_WAIT, S_H_READ, S_H_READ_DONE
  } state_e;

  state_e           state;
  logic [$clog2(MEM_DIV)-1:0] div_cnt;
  logic [N_IN-1:0]  todo;
  logic             found;
  logic [ROW_W-1:0] nxt;
  logic             cur_a, cur_g;
  logic [ROW_W-1:0] cur_row;
  logic [ROW_W-1:0] mac_row;
  logic             array_free;

  find_first_set #(.W(N_IN), .IDX_W(ROW_W)) u_ffs (.vec(todo), .found(found), .idx(nxt));

  // memory clock divider
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else if (div_cnt == ($clog2(MEM_DIV))'(MEM_DIV - 1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign mem_tick = (div_cnt == '0);

  assign cmd_ready = (state == S_IDLE);
  assign wu_en     = cur_a;
  assign ws_row    = cur_row;
  assign delta_row   = mac_row;
  assign delta_valid = mac_done;
  // no array read while the write scheduler programs a row
  assign array_free  = !ws_busy && !ws_start;

  always_comb begin
    rd_en = 1'b0;
    rd_row = cur_row;
    if (mem_tick && found && (state == S_F_ISSUE || (state == S_B_ISSUE && array_free))) begin
      rd_en  = 1'b1;
      rd_row = nxt;
    end
    if (mem_tick && state == S_H_READ) rd_en = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      todo          <= '0;
      cur_a         <= 1'b0;
      cur_g         <= 1'b0;
      cur_row       <= '0;
      done          <= 1'b0;
      neuron_clear  <= 1'b0;
      neuron_acc    <= 1'b0;
      fire          <= 1'b0;
      delta_latch   <= 1'b0;
      mac_start     <= 1'b0;
      ws_start      <= 1'b0;
      ws_host       <= 1'b0;
      mac_row       <= '0;
      host_rd_valid <= 1'b0;
    end else begin
      done          <= 1'b0;
      neuron_clear  <= 1'b0;
      neuron_acc    <= 1'b0;
      fire          <= 1'b0;
      delta_latch   <= 1'b0;
      mac_start     <= 1'b0;
      ws_start      <= 1'b0;
      host_rd_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur_row <= cmd_row;
          ws_host <= 1'b0;
          unique case (cmd)
            CMD_FORWARD: begin
              todo         <= spike_map;
              neuron_clear <= 1'b1;
              state        <= S_F_ISSUE;
            end
            CMD_BACKWARD: begin
              todo        <= spike_map | grad_map;
              delta_latch <= 1'b1;
              state       <= S_B_ISSUE;
            end
            CMD_WRITE_ROW: begin
              ws_host <= 1'b1;
              state   <= S_H_WRITE;
            end
            default: state <= S_H_READ;
          endcase
        end
        // ---------------- forward pass ----------------
        S_F_ISSUE: if (mem_tick) begin
          if (found) begin
            todo[nxt]  <= 1'b0;
            neuron_acc <= 1'b1;          // sensed row is added next cycle
          end else begin
            state <= S_F_FIRE;
          end
        end
        S_F_FIRE: if (!router_busy) begin
          fire  <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        // ---------------- backward pass ----------------
        S_B_ISSUE: if (mem_tick && array_free) begin
          if (found) begin
            todo[nxt] <= 1'b0;
            cur_row   <= nxt;
            cur_a     <= spike_map[nxt];
            cur_g     <= grad_map[nxt];
            state     <= S_B_OPS;
          end else begin
            state <= S_B_DRAIN;
          end
        end
        // sensed row is in rd_data; wait for the MAC if this row needs it
        S_B_OPS: if (!cur_g || (!mac_busy && !mac_start)) begin
          mac_start <= cur_g;
          ws_start  <= cur_a;
          if (cur_g) mac_row <= cur_row;
          state     <= S_B_ISSUE;
        end
        S_B_DRAIN: if (!mac_start && !mac_busy && !mac_done && array_free) begin
          cur_a <= 1'b0;
          cur_g <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        // ---------------- host access ----------------
        S_H_WRITE: begin
          ws_start <= 1'b1;
          state    <= S_H_WAIT;
        end
        S_H_WAIT: if (!ws_start && !ws_busy) begin
          ws_host <= 1'b0;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        S_H_READ: if (mem_tick) state <= S_H_READ_DONE;
        S_H_READ_DONE: begin
          host_rd_valid <= 1'b1;
          done          <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mac_start |-> !mac_busy)
    else $error("core_controller: MAC started while busy");

endmodule
