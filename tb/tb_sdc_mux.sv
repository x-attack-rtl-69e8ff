// tb_sdc_mux: exhaustive check of the gate-level multiplexer and of its
// don't-care pair: o = s ? a : b, n1 = s & a, n3 = ~s & b, and (n1, n3)
// never (1, 1).
module tb_sdc_mux;
  logic s, a, b, o, n1, n3;
  int checks = 0, failures = 0;

  sdc_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {s, a, b} = 3'(i);
      #1;
      checks += 4;
      if (o  !== (s ? a : b))   begin failures++; $display("FAIL o  for %b", i[2:0]); end
      if (n1 !== (s & a))       begin failures++; $display("FAIL n1 for %b", i[2:0]); end
      if (n3 !== (!s & b))      begin failures++; $display("FAIL n3 for %b", i[2:0]); end
      if (n1 && n3)             begin failures++; $display("FAIL pair (1,1)"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
