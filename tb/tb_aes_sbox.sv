// tb_aes_sbox: exhaustive check of the split-table S-box against the
// reference S-box (found by inverse search), and of its don't-care pair on
// output bit 3: n1 = a[7] & S(a)[3], n3 = ~a[7] & S(a)[3], never (1, 1).
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, s;
  logic n1, n3;
  int checks = 0, failures = 0;

  aes_sbox #(.TRIG_BIT(3)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned e;
    sbox_init();
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      e = sbox(8'(i));
      checks += 3;
      if (s !== e) begin failures++; $display("FAIL S(%h)=%h exp %h", a, s, e); end
      if ({n1, n3} !== {a[7] & e[3], !a[7] & e[3]}) begin
        failures++; $display("FAIL pair for %h", a);
      end
      if (n1 && n3) begin failures++; $display("FAIL pair (1,1) for %h", a); end
    end
    // spot values from FIPS-197 figure 7
    a = 8'h53; #1; checks++; if (s !== 8'hed) failures++;
    a = 8'h00; #1; checks++; if (s !== 8'h63) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
