// xattack_attacker: the attacker tenant's region - two equal ring-
// oscillator banks under a hardware controller, plus a carry-chain voltage
// sensor whose readings are buffered for the host.
//
// The host selects a mode and pulses start; attack_ctrl then drives the
// bank enables en1/en2 for ATTACK_CYCLES cycles. While v_record is high the
// sensor's depth reading is written into the V FIFO once per cycle (until
// the FIFO is full), and the host drains it through v_rd/v_data. The
// banks, controller, sensor and V FIFO follow the system description; the
// recording handshake and the V FIFO depth (one reading per cycle of the
// longest attack) are this design's choices. The ring-oscillator banks are
// behavioural models, so this module is synthesizable only with real
// oscillators substituted for them.
module xattack_attacker
  import xattack_pkg::*;
#(
  parameter int unsigned ATTACK_CYCLES = 4096,
  parameter int unsigned N_RO          = 9500,   // oscillators per bank
  parameter int unsigned SENSOR_W      = 255,
  parameter int unsigned V_DEPTH       = 4096
) (
  input  logic         clk,
  input  logic         rst,        // asynchronous, active high
  input  logic         clk_ps,     // phase-shifted clock for the sensor
  input  attack_mode_e mode,
  input  logic         start,
  output logic         busy,
  output logic         done,
  input  logic         v_record,   // write sensor readings into the V FIFO
  input  logic         v_rd,
  output logic [$clog2(SENSOR_W+1)-1:0] v_data,
  output logic         v_empty
);
  localparam int unsigned DW = $clog2(SENSOR_W + 1);

  logic en1, en2;
  logic [N_RO-1:0] ro1, ro2;
  logic [SENSOR_W-1:0] sample;
  logic [DW-1:0] depth;
  logic v_full;
  logic [$clog2(V_DEPTH+1)-1:0] v_count;

  attack_ctrl #(.ATTACK_CYCLES(ATTACK_CYCLES)) u_ctrl (
    .clk, .rst, .start, .mode, .busy, .done, .en1, .en2);

  ro_bank #(.N_RO(N_RO)) u_ro1 (.en(en1), .ro_out(ro1));
  ro_bank #(.N_RO(N_RO)) u_ro2 (.en(en2), .ro_out(ro2));

  vdrop_sensor #(.W(SENSOR_W)) u_sensor (
    .clk, .rst, .clk_ps, .sample(sample), .depth(depth));

  sync_fifo #(.WIDTH(DW), .DEPTH(V_DEPTH)) u_v_fifo (
    .clk, .rst, .wr_en(v_record && !v_full), .wr_data(depth), .rd_en(v_rd),
    .rd_data(v_data), .full(v_full), .empty(v_empty), .count(v_count));
endmodule
