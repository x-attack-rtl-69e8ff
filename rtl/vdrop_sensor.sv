// vdrop_sensor: delay-line voltage-drop sensor built on the carry chain.
//
// A W-bit ripple-carry adder adds an all-zeros operand to an all-ones
// operand with carry-in driven by clk_ps, a copy of the system clock
// shifted in phase. Settled, the sum is all ones while clk_ps is 0 and all
// zeros while it is 1. The sum is sampled on the system clock edge; because
// of the phase shift the sampled word shows how far the latest carry-in
// transition has travelled along the chain, and a voltage drop shortens
// that distance. The sampled word is registered in sample and reduced, one
// cycle later, to depth = number of zero bits (0..W). The adder,
// operands, width (255) and clocking follow the sensor description; the
// reduction to a zero count is this design's choice (with W = 255 it fits
// in 8 bits). keep attributes stop synthesis from folding the constant
// operands. In a zero-delay simulation the sample is all ones or all zeros.
module vdrop_sensor #(
  parameter int unsigned W = 255
) (
  input  logic                   clk,      // sampling clock (system clock)
  input  logic                   rst,      // asynchronous, active high
  input  logic                   clk_ps,   // phase-shifted clock, carry-in
  output logic [W-1:0]           sample,   // raw carry-chain snapshot
  output logic [$clog2(W+1)-1:0] depth     // zero bits in the snapshot
);
  localparam int unsigned DW = $clog2(W + 1);

  (* keep *) logic [W-1:0] op_a;
  (* keep *) logic [W-1:0] op_b;
  logic [W-1:0] sum;
  logic         cout;   // carry-out, 1 once the carry has crossed the chain

  assign op_a = '0;
  assign op_b = '1;
  assign {cout, sum} = {1'b0, op_a} + {1'b0, op_b} + {{W{1'b0}}, clk_ps};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sample <= '1;
      depth  <= '0;
    end else begin
      sample <= sum;
      depth  <= DW'(W - $countones(sample));
    end
  end
endmodule
