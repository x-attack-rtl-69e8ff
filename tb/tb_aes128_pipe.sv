// tb_aes128_pipe: checks the pipelined AES-128 core against the FIPS-197
// example vectors and the reference model for random keys and plaintexts
// streamed one per cycle, checks the 11-cycle latency, and checks that the
// hidden Trojan never changes the output when timing is correct, even for
// plaintext pairs that toggle its trigger signals every cycle.
module tb_aes128_pipe;
  import xattack_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [127:0] pt = '0, key = '0;
  logic out_valid;
  logic [127:0] ct;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes128_pipe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    logic [127:0] k, p, lit;   // key, plaintext, published ciphertext
    bit           has_lit;
    int           t;           // cycle the block entered
  } blk_t;
  blk_t sent_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    blk_t b;
    logic [127:0] e;
    b = sent_q.pop_front();
    e = aes(b.k, b.p);
    if (b.has_lit) check(e == b.lit, "reference model against published vector");
    check(ct == e, $sformatf("ct %h exp %h", ct, e));
    check(cycle - b.t == 11, $sformatf("latency %0d", cycle - b.t));
  end

  task automatic send(input logic [127:0] k, input logic [127:0] p,
                      input logic [127:0] lit = '0, input bit has_lit = 0);
    @(negedge clk);
    key = k; pt = p; in_valid = 1;
    sent_q.push_back('{k: k, p: p, lit: lit, has_lit: has_lit, t: cycle});
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pa, pb, li, k;
    logic [1:0] p;
    int found_a, found_b;
    sbox_init();
    repeat (3) @(posedge clk);
    rst = 0;
    // FIPS-197 example vectors (appendix C.1 and appendix B)
    send(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
         128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    send(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
         128'h3925841d02dc09fbdc118597196a0b32, 1);
    for (int i = 0; i < 200; i++)
      send({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    // find a plaintext pair that alternates the trigger pair (1,0)/(0,1)
    k = 128'h85458a2bb4a9aafdee2b10139e9e781a;
    found_a = 0; found_b = 0;
    for (int i = 0; i < 2000 && !(found_a && found_b); i++) begin
      logic [127:0] c;
      c = {$urandom, $urandom, $urandom, $urandom};
      void'(encrypt(k, c, li));
      p = sdc_pair(li[127:120], 0);
      if (p == 2'b10 && !found_a) begin pa = c; found_a = 1; end
      if (p == 2'b01 && !found_b) begin pb = c; found_b = 1; end
    end
    check(found_a && found_b, "trigger-toggling plaintexts found");
    for (int i = 0; i < 100; i++) send(k, (i % 2) ? pb : pa);
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    check(sent_q.size() == 0, "all blocks came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
