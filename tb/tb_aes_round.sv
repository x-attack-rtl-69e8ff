// tb_aes_round: checks a middle round (round 1) and the last round
// (round 10, no MixColumns) against the reference round function and the
// reference key expansion, for random states and keys; both stages have a
// latency of one cycle. Also checks the byte-0 S-box input and don't-care
// pair brought out for the Trojan.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic clk = 0;
  logic [127:0] st1_i, rk1_i, st1_o, rk1_o, st10_i, rk10_i, st10_o, rk10_o;
  logic n1a, n3a, n1b, n3b;
  logic [7:0] sb_a, sb_b;
  int checks = 0, failures = 0;

  aes_round #(.ROUND(1))                u_r1  (.clk, .state_i(st1_i),  .rkey_i(rk1_i),
    .state_o(st1_o),  .rkey_o(rk1_o),  .sdc_n1(n1a), .sdc_n3(n3a), .sb0_in(sb_a));
  aes_round #(.ROUND(10), .LAST(1'b1))  u_r10 (.clk, .state_i(st10_i), .rkey_i(rk10_i),
    .state_o(st10_o), .rkey_o(rk10_o), .sdc_n1(n1b), .sdc_n3(n3b), .sb0_in(sb_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] rk [11];
    logic [127:0] key, s1, s10;
    logic [1:0] pr;
    sbox_init();
    for (int i = 0; i < 100; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      s1  = {$urandom, $urandom, $urandom, $urandom};
      s10 = {$urandom, $urandom, $urandom, $urandom};
      expand(key, rk);
      @(negedge clk);
      st1_i = s1;  rk1_i = rk[0];
      st10_i = s10; rk10_i = rk[9];
      #1;
      pr = sdc_pair(s10[127:120], 0);
      check(sb_b == s10[127:120] && sb_a == s1[127:120], "S-box input tap");
      check({n1b, n3b} == pr, "don't-care pair");
      @(posedge clk); #1;
      check(rk1_o == rk[1], $sformatf("round key 1 %h exp %h", rk1_o, rk[1]));
      check(rk10_o == rk[10], "round key 10");
      check(st1_o == round_ref(s1, rk[1], 0), "round 1 state");
      check(st10_o == round_ref(s10, rk[10], 1), "round 10 state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
