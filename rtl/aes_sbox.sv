// aes_sbox: AES SubBytes S-box for one byte, built so that it contains a
// satisfiability don't-care pair an SDC Trojan can tap.
//
// The 256-entry table is split into two 128-entry halves addressed by the
// low seven input bits; input bit 7 then selects between the two halves,
// one sdc_mux per output bit. The n1/n3 nets of the multiplexer on output
// bit TRIG_BIT are brought out: they are never 1 at the same time. The
// table contents are computed at elaboration from the GF(2^8) definition of
// the S-box (xattack_pkg::sbox_calc). Splitting the S-box this way is this
// design's own choice of where the don't-care pair comes from; only the
// fact that the pair is taken from the S-box follows the attack description.
// Purely combinational.
module aes_sbox #(
  parameter int unsigned TRIG_BIT = 0   // output bit whose multiplexer feeds n1/n3
) (
  input  logic [7:0] a,    // S-box input
  output logic [7:0] s,    // S-box output S(a)
  output logic       n1,   // a[7] & S({1,a[6:0]})[TRIG_BIT]
  output logic       n3    // ~a[7] & S({0,a[6:0]})[TRIG_BIT]
);
  import xattack_pkg::*;

  localparam logic [1023:0] TABLE_LO = sbox_half_table(1'b0);
  localparam logic [1023:0] TABLE_HI = sbox_half_table(1'b1);

  logic [7:0] lo, hi;
  logic [7:0] n1_v, n3_v;

  assign lo = TABLE_LO[8*a[6:0] +: 8];
  assign hi = TABLE_HI[8*a[6:0] +: 8];

  for (genvar b = 0; b < 8; b++) begin : g_bit
    sdc_mux u_mux (.s(a[7]), .a(hi[b]), .b(lo[b]), .o(s[b]), .n1(n1_v[b]), .n3(n3_v[b]));
  end

  assign n1 = n1_v[TRIG_BIT];
  assign n3 = n3_v[TRIG_BIT];
endmodule
