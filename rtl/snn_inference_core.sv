// snn_inference_core: neurosynaptic inference core with a 256 x 256 NVM
// crossbar, 32 neurons and 8-bit fixed-point synapses.
//
// This is the smaller, inference-only core from which the learning core is
// derived. Its crossbar has one wordline per input (N_IN = 256) and 256
// bitlines; the 8 adjacent bitlines 8j..8j+7 hold the 8-bit weight from the
// input to neuron j, so 32 neurons share one row. Geometry and weight
// precision follow the paper; the weight format (two's complement, bit
// b in bitline 8j+b) and the 16-bit membrane potential are this design's
// choices.
//
// Operation: input spike packets set wordline flags (spike_decoder; the
// gradient kind is accepted but unused here). CMD_FORWARD clears the
// potentials and reads the spiking rows in ascending order, one per clock;
// the row read in one cycle is added by all 32 neurons in the next, so a
// time step with N spiking rows takes N+1 cycles and performs 32 synaptic
// operations per row. Then spike_out latches v > theta for every neuron.
// CMD_WRITE_ROW programs a whole row in one cycle and CMD_READ_ROW reads
// one back; CMD_BACKWARD is not supported by this core and simply
// completes.
//
// Clocking: the whole core runs on the memory clock (100 MHz for the
// STT-RAM array in the paper, 3.2 GSOPS with 32 neurons); the array is
// accessed on every cycle. Handshake: a command is taken while cmd_ready
// is high; done pulses when it finishes.
module snn_inference_core
  import snn_pkg::*;
#(
  parameter int unsigned N_IN      = 256,
  parameter int unsigned N_NEURONS = 32,
  parameter int unsigned WB        = 8,
  parameter int unsigned V_BITS    = 16,
  parameter int unsigned ROW_W     = $clog2(N_IN)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd_valid,
  output logic                     cmd_ready,
  input  core_cmd_e                cmd,
  input  logic [ROW_W-1:0]         cmd_row,
  output logic                     done,
  input  logic signed [V_BITS-1:0] theta,
  input  logic                     spikes_clear,
  input  logic                     pkt_in_valid,
  input  pkt_kind_e                pkt_in_kind,
  input  logic [ROW_W-1:0]         pkt_in_addr,
  output logic signed [V_BITS-1:0] v_out [N_NEURONS],
  output logic [N_NEURONS-1:0]     spike_out,
  input  logic signed [WB-1:0]     host_wr_data [N_NEURONS],
  output logic                     host_rd_valid,
  output logic signed [WB-1:0]     host_rd_data [N_NEURONS]
);

  localparam int unsigned COLS = N_NEURONS * WB;

  typedef enum logic [2:0] {S_IDLE, S_FWD, S_FIRE, S_WRITE, S_READ, S_READ_DONE} state_e;

  state_e           state;
  logic [N_IN-1:0]  spike_map, todo;
  logic             found;
  logic [ROW_W-1:0] nxt, row_q;
  logic             rd_en, wr_en, acc, clr;
  logic [ROW_W-1:0] rd_row;
  logic [COLS-1:0]  rd_data, wr_data;
  logic [N_NEURONS-1:0] spike_now;

  spike_decoder #(.N_IN(N_IN), .ADDR_W(ROW_W)) u_dec (
    .clk, .rst_n, .clear(spikes_clear),
    .pkt_valid(pkt_in_valid), .pkt_kind(pkt_in_kind), .pkt_addr(pkt_in_addr),
    .spike_map, .grad_map()                // gradient flags unused here
  );

  find_first_set #(.W(N_IN), .IDX_W(ROW_W)) u_ffs (.vec(todo), .found(found), .idx(nxt));

  stt_crossbar #(.ROWS(N_IN), .COLS(COLS), .ROW_W(ROW_W)) u_array (
    .clk, .mem_tick(1'b1),
    .rd_en, .rd_row, .rd_data,
    .wr_en, .wr_row(row_q), .wr_data, .wr_mask('1)
  );

  for (genvar j = 0; j < int'(N_NEURONS); j++) begin : g_neuron
    assign host_rd_data[j] = rd_data[j*WB +: WB];
    assign wr_data[j*WB +: WB] = host_wr_data[j];
    fxp_neuron #(.W_BITS(WB), .V_BITS(V_BITS)) u_neuron (
      .clk, .rst_n, .clear(clr), .acc_en(acc),
      .w(rd_data[j*WB +: WB]), .theta,
      .v(v_out[j]), .spike(spike_now[j])
    );
  end

  assign cmd_ready = (state == S_IDLE);
  assign rd_en     = (state == S_FWD && found) || state == S_READ;
  assign rd_row    = (state == S_FWD) ? nxt : row_q;
  assign wr_en     = (state == S_WRITE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      todo          <= '0;
      row_q         <= '0;
      acc           <= 1'b0;
      clr           <= 1'b0;
      done          <= 1'b0;
      host_rd_valid <= 1'b0;
      spike_out     <= '0;
    end else begin
      acc           <= 1'b0;
      clr           <= 1'b0;
      done          <= 1'b0;
      host_rd_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          row_q <= cmd_row;
          unique case (cmd)
            CMD_FORWARD:   begin todo <= spike_map; clr <= 1'b1; state <= S_FWD; end
            CMD_WRITE_ROW: state <= S_WRITE;
            CMD_READ_ROW:  state <= S_READ;
            default:       done <= 1'b1;      // no backward pass in this core
          endcase
        end
        S_FWD: begin
          if (found) begin
            todo[nxt] <= 1'b0;
            acc       <= 1'b1;
          end else begin
            state <= S_FIRE;
          end
        end
        S_FIRE: begin
          spike_out <= spike_now;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        S_WRITE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_READ: state <= S_READ_DONE;
        S_READ_DONE: begin
          host_rd_valid <= 1'b1;
          done          <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
