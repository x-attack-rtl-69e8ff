// xattack_top: one shared FPGA holding two tenants that have no logical
// connection - a victim running an AES-128 service whose core hides a
// satisfiability don't-care Trojan, and an attacker running power-wasting
// ring oscillators. Both are driven by the host processor through the
// ports below.
//
// The only coupling between the two regions is the shared power supply:
// while the oscillators run, the victim's paths slow down, and once the
// slower of the Trojan's two trigger paths misses the clock edge the
// Trojan fires and the key replaces the ciphertext. With PROTECTION = 1
// the victim's delay-chain detector, which fails first, replaces the
// output by zero instead. That coupling is physical and is not part of any
// logic here. One clock, clk, serves both regions (the victim's AES clock);
// clk_ps is the phase-shifted copy that feeds the attacker's sensor.
// The partition into the two regions and the host interfaces follow the
// system description; port naming and the single clock are this design's
// choices.
module xattack_top
  import xattack_pkg::*;
#(
  parameter int unsigned     PT_DEPTH      = 4096,
  parameter int unsigned     CT_DEPTH      = 4096,
  parameter trojan_variant_e VARIANT       = TROJAN_2,
  parameter bit              PROTECTION    = 1'b1,
  parameter int unsigned     N_BUF         = 15,
  parameter int unsigned     ATTACK_CYCLES = 4096,
  parameter int unsigned     N_RO          = 9500,
  parameter int unsigned     SENSOR_W      = 255,
  parameter int unsigned     V_DEPTH       = 4096
) (
  input  logic         clk,
  input  logic         clk_ps,
  input  logic         rst,          // asynchronous, active high
  // victim service, host side
  input  logic [127:0] victim_key,
  input  logic         pt_wr,
  input  logic [127:0] pt_data,
  output logic         pt_full,
  input  logic         ct_rd,
  output logic [127:0] ct_data,
  output logic         ct_empty,
  output logic         alarm,
  // attacker control, host side
  input  attack_mode_e atk_mode,
  input  logic         atk_start,
  output logic         atk_busy,
  output logic         atk_done,
  input  logic         v_record,
  input  logic         v_rd,
  output logic [$clog2(SENSOR_W+1)-1:0] v_data,
  output logic         v_empty
);
  xattack_victim #(
    .PT_DEPTH(PT_DEPTH), .CT_DEPTH(CT_DEPTH), .VARIANT(VARIANT),
    .PROTECTION(PROTECTION), .N_BUF(N_BUF)
  ) u_victim (
    .clk, .rst, .key(victim_key), .pt_wr, .pt_data, .pt_full,
    .ct_rd, .ct_data, .ct_empty, .alarm);

  xattack_attacker #(
    .ATTACK_CYCLES(ATTACK_CYCLES), .N_RO(N_RO), .SENSOR_W(SENSOR_W), .V_DEPTH(V_DEPTH)
  ) u_attacker (
    .clk, .rst, .clk_ps, .mode(atk_mode), .start(atk_start), .busy(atk_busy),
    .done(atk_done), .v_record, .v_rd, .v_data, .v_empty);
endmodule
