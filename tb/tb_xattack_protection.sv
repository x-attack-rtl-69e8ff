// tb_xattack_protection: checks the delay-chain fault detector.
// Without faults valid stays 1, alarm 0 and data_o = data_i every cycle.
// A modelled timing fault in the delay chain (the check flip-flop captures
// the chain's value of one cycle earlier) must clear valid, raise alarm and
// force data_o to zero in every faulted cycle; after the fault is gone the
// circuit must recover by itself.
module tb_xattack_protection;
  localparam int W = 64;
  logic clk = 0, rst = 1;
  logic [W-1:0] data_i, data_o;
  logic valid, alarm;
  bit   fault = 0;
  logic last_d, stale;
  int   checks = 0, failures = 0, zeroed = 0;

  xattack_protection #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  // Timing-fault model of the chain: while fault is set, the check
  // flip-flop sees at its clock edge the chain input of one cycle earlier.
  // Sampled and forced at the falling edge, when everything has settled.
  always @(negedge clk) begin
    stale  = last_d;
    last_d = dut.q_tog;
    if (fault) force dut.chain_out = stale;
    else       release dut.chain_out;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_i = '1;
    #12;
    check(valid && data_o == data_i, "valid during reset");
    @(negedge clk) rst = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      data_i = {$urandom, $urandom};
      #1 check(valid && !alarm && data_o == data_i, "normal operation");
    end
    @(negedge clk) fault = 1;
    // the first faulted edge still captures the correct (previous) value
    @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      data_i = {$urandom, $urandom};
      #1 check(!valid && alarm && data_o == '0, "fault detected");
      if (data_o == '0) zeroed++;
    end
    fault = 0;
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      data_i = {$urandom, $urandom};
      #1 check(valid && !alarm && data_o == data_i, "recovered");
    end
    check(zeroed == 20, "outputs zeroed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
