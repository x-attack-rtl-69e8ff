// pdn_model: behavioural model, for the testbenches only, of the shared
// power-distribution network of the FPGA and of how the attacker's
// oscillators slow the victim's paths down.
//
// Every path delay is scaled by (1 + K_PER_RO * n), n being the number
// of oscillators currently enabled (N_RO per enabled bank), sampled each
// rising clock edge. A path is flagged as faulting while its scaled
// delay exceeds the clock period. Calibration: the victim runs at
// 160 MHz (6.25 ns); the slower and faster Trojan trigger paths take
// 4.376 ns and 3.274 ns; K_PER_RO is chosen so that the slower trigger
// path starts to fail at 18k oscillators. The protection chain is taken
// as 0.137 ns longer than an assumed 6.0 ns critical path. The sensor's
// carry is taken to travel SENSE_D0 bits per sampling interval at nominal
// voltage and proportionally fewer under load. All of this is a
// first-order stand-in for an analog effect, not a circuit.
module pdn_model #(
  parameter int  N_RO       = 9500,
  parameter real T_CLK_NS   = 6.25,
  parameter real D_TRIG1_NS = 4.376,
  parameter real D_TRIG2_NS = 3.274,
  parameter real D_CHAIN_NS = 6.137,
  parameter real K_PER_RO   = (6.25 / 4.376 - 1.0) / 18000.0,
  parameter int  SENSE_D0   = 200
) (
  input  logic clk,
  input  logic en1,
  input  logic en2,
  output logic fault_trig1,
  output logic fault_trig2,
  output logic fault_chain,
  output int   active_ros,
  output int   sense_depth
);
  real scale;

  initial begin
    fault_trig1 = 0; fault_trig2 = 0; fault_chain = 0;
    active_ros = 0; sense_depth = SENSE_D0;
  end

  always @(posedge clk) begin
    active_ros  = N_RO * (int'(en1) + int'(en2));
    scale       = 1.0 + K_PER_RO * active_ros;
    fault_trig1 = (D_TRIG1_NS * scale) > T_CLK_NS;
    fault_trig2 = (D_TRIG2_NS * scale) > T_CLK_NS;
    fault_chain = (D_CHAIN_NS * scale) > T_CLK_NS;
    sense_depth = int'($floor(SENSE_D0 / scale));
  end
endmodule
