// sdc_mux: gate-level 2-to-1 multiplexer, O = S&A | ~S&B, that also brings
// out its two internal AND-gate outputs.
//
// n1 = S & A and n3 = ~S & B share the select S, so (n1, n3) = (1, 1) can
// never occur in a correctly timed circuit: the pair is a satisfiability
// don't-care (SDC). This is the textbook example of an SDC pair and the
// place where the Trojan taps its triggers. Purely combinational; the
// internal net n2 is the inverted select.
module sdc_mux (
  input  logic s,    // select
  input  logic a,    // data taken when s = 1
  input  logic b,    // data taken when s = 0
  output logic o,    // multiplexer output
  output logic n1,   // s & a
  output logic n3    // ~s & b
);
  logic n2;

  assign n2 = ~s;
  assign n1 = s & a;
  assign n3 = n2 & b;
  assign o  = n1 | n3;
endmodule
