// tb_sdc_trojan: checks the three Trojan variants.
// Phase 1: trigger pairs taken from a real multiplexer (random inputs)
// never fire the Trojan: o_t always equals o.
// Phase 2: plaintext-like stimuli alternate the pair between (1,0) and
// (0,1) every cycle, and a modelled timing fault makes trigger flip-flop 1
// capture the value its input had one cycle earlier (a path longer than
// the clock period). The Trojan must then put the payload f on o_t exactly
// in the cycles a behavioural model of the faulty flip-flops predicts.
module tb_sdc_trojan;
  import xattack_pkg::*;
  localparam int W = 32;
  localparam logic [W-1:0] PAYLOAD = 32'hc0ffee11;

  logic clk = 0, rst = 1;
  logic ms, ma, mb, mo, n1, n3, x, y;
  logic [W-1:0] o, ot1, ot2, ot3;
  bit   fault = 0;
  int   checks = 0, failures = 0, fires [3] = '{0, 0, 0};

  sdc_mux src (.s(ms), .a(ma), .b(mb), .o(mo), .n1(n1), .n3(n3));

  sdc_trojan #(.W(W), .VARIANT(TROJAN_1)) u1 (.clk, .rst, .s1(n1), .s2(n3), .x, .y, .o, .f(PAYLOAD), .o_t(ot1));
  sdc_trojan #(.W(W), .VARIANT(TROJAN_2)) u2 (.clk, .rst, .s1(n1), .s2(n3), .x, .y, .o, .f(PAYLOAD), .o_t(ot2));
  sdc_trojan #(.W(W), .VARIANT(TROJAN_3)) u3 (.clk, .rst, .s1(n1), .s2(n3), .x, .y, .o, .f(PAYLOAD), .o_t(ot3));

  always #5 clk = ~clk;

  // Independent model of the trigger flip-flop inputs of each variant.
  function automatic logic [1:0] d_model(int v);
    logic u1_, u2_;
    u1_ = (v == 2) ? ((n1 & n3) | (x & y))  : n1;
    u2_ = (v == 2) ? ((n1 & n3) | (!x & y)) : n3;
    return (v == 0) ? {u1_, u2_} : {!u1_, !u2_};
  endfunction

  logic [1:0] mq [3];      // modelled trigger flip-flops
  logic       last1 [3];   // flip-flop 1 input one cycle ago
  logic       stale [3];   // value a faulty flip-flop 1 holds this cycle

  // Timing-fault model: flip-flop 1 of every instance sees at its clock
  // edge its input of one cycle earlier. Inputs are sampled and forced at
  // the falling edge, when everything has settled.
  logic [1:0] dnow [3];
  always @(negedge clk) begin
    stale = last1;
    for (int v = 0; v < 3; v++) begin
      dnow[v]  = d_model(v);
      last1[v] = dnow[v][1];
    end
    if (fault) begin
      force u1.d1 = stale[0];
      force u2.d1 = stale[1];
      force u3.d1 = stale[2];
    end else begin
      release u1.d1;
      release u2.d1;
      release u3.d1;
    end
  end

  // Model of the trigger flip-flops.
  always @(posedge clk)
    for (int v = 0; v < 3; v++)
      if (!rst) mq[v] = {fault ? stale[v] : dnow[v][1], dnow[v][0]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Compare outputs after every edge.
  always @(negedge clk) if (!rst) begin
    logic [W-1:0] got [3];
    got = '{ot1, ot2, ot3};
    for (int v = 0; v < 3; v++) begin
      bit fire;
      fire = (v == 0) ? (mq[v] == 2'b11) : (mq[v] == 2'b00);
      if (fire) fires[v]++;
      check(got[v] == (fire ? PAYLOAD : o), $sformatf("variant %0d fire=%0d", v + 1, fire));
    end
    check(!(n1 && n3), "don't-care pair never (1,1)");
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mq = '{2'b00, 2'b11, 2'b11};
    {ms, ma, mb, x, y} = '0;
    o = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1: normal operation
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      #1 {ms, ma, mb, x, y} = 5'($urandom);
      o = $urandom;
    end
    for (int v = 0; v < 3; v++) check(fires[v] == 0, "no firing without faults");
    // phase 2: alternating trigger pair under a timing fault on path 1
    @(posedge clk);
    #1 fault = 1;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk);
      #1 if (i % 2 == 0) {ms, ma, mb, x, y} = 5'b11011;
         else            {ms, ma, mb, x, y} = 5'b00101;
      o = $urandom;
    end
    @(posedge clk);
    #1 fault = 0;
    repeat (4) @(posedge clk);
    for (int v = 0; v < 3; v++)
      check(fires[v] >= 15, $sformatf("variant %0d fired %0d times", v + 1, fires[v]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
