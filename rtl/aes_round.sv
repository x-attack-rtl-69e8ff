// aes_round: one registered stage of a fully unrolled AES-128 pipeline.
//
// Each clock edge it captures SubBytes, ShiftRows, MixColumns (left out
// when LAST=1) and AddRoundKey applied to state_i, together with the round
// key it derives on the fly from the previous round key rkey_i (the AES-128
// key-expansion step with round constant rcon(ROUND)). Byte 0 of a block is
// bits [127:120], as in FIPS-197. Latency one cycle, one block per cycle.
//
// The S-box on state byte 0 also brings out its don't-care pair (n1, n3)
// and its input byte, combinationally, for the Trojan of the last round.
// The stage structure (one round per register stage, key schedule carried
// along) is this design's own choice; the cipher itself is standard AES.
module aes_round #(
  parameter int unsigned ROUND    = 1,   // 1..10
  parameter bit          LAST     = 1'b0,
  parameter int unsigned TRIG_BIT = 0
) (
  input  logic         clk,
  input  logic [127:0] state_i,   // state after the previous round
  input  logic [127:0] rkey_i,    // previous round key
  output logic [127:0] state_o,   // registered state after this round
  output logic [127:0] rkey_o,    // registered round key of this round
  output logic         sdc_n1,    // don't-care pair of byte-0 S-box (combinational)
  output logic         sdc_n3,
  output logic [7:0]   sb0_in     // input of the byte-0 S-box (combinational)
);
  import xattack_pkg::*;

  logic [127:0] sub, shifted, mixed, rkey_next;
  logic [31:0]  sub_word;
  logic [15:0]  n1_v, n3_v;
  logic [3:0]   kn1_v, kn3_v;

  // SubBytes
  for (genvar k = 0; k < 16; k++) begin : g_sub
    aes_sbox #(.TRIG_BIT(TRIG_BIT)) u_sbox (
      .a (state_i[127-8*k -: 8]), .s (sub[127-8*k -: 8]), .n1(n1_v[k]), .n3(n3_v[k]));
  end

  // Key expansion: SubWord(RotWord(w3))
  for (genvar k = 0; k < 4; k++) begin : g_key
    aes_sbox #(.TRIG_BIT(TRIG_BIT)) u_sbox (
      .a (rkey_i[31-8*((k+1)%4) -: 8]), .s (sub_word[31-8*k -: 8]),
      .n1(kn1_v[k]), .n3(kn3_v[k]));
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    {w0, w1, w2, w3} = rkey_i;
    w0 = w0 ^ sub_word ^ {rcon(ROUND), 24'h0};
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    rkey_next = {w0, w1, w2, w3};
  end

  // ShiftRows: byte (4c + r) takes byte (4((c + r) mod 4) + r)
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shifted[127-8*(4*c+r) -: 8] = sub[127-8*(4*((c+r)%4)+r) -: 8];
  end

  always_comb begin
    for (int c = 0; c < 4; c++)
      mixed[127-32*c -: 32] = LAST ? shifted[127-32*c -: 32] : mix_column(shifted[127-32*c -: 32]);
  end

  always_ff @(posedge clk) begin
    state_o <= mixed ^ rkey_next;
    rkey_o  <= rkey_next;
  end

  assign sdc_n1 = n1_v[0];
  assign sdc_n3 = n3_v[0];
  assign sb0_in = state_i[127:120];
endmodule
