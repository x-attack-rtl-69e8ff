// tb_ro_bank: checks the behavioural oscillator bank (reduced to 64
// oscillators): all outputs rest at 1 while disabled, toggle with period
// 2*RO_DELAY_PS while enabled, and stop again when the enable drops.
module tb_ro_bank;
  logic en = 0;
  logic [63:0] ro_out;
  int checks = 0, failures = 0, edges = 0;

  ro_bank #(.N_RO(64), .RO_DELAY_PS(1000)) dut (.*);

  always @(ro_out[0]) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ns;
    check(ro_out == '1, "disabled bank rests at 1");
    edges = 0;
    #10ns;
    check(edges == 0, "no oscillation while disabled");
    en = 1;
    #100.5ns;
    // 100 ns at 1 ns per half period
    check(edges >= 99 && edges <= 101, $sformatf("edges while enabled %0d", edges));
    check(ro_out == '0 || ro_out == '1, "oscillators switch together");
    en = 0;
    #5ns;
    check(ro_out == '1, "stops at 1 when disabled");
    edges = 0;
    #20ns;
    check(edges == 0, "no oscillation after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
