// tb_vdrop_sensor: checks the carry-chain sensor at its full 255-bit
// width. With the carry-in clock low at the sampling edge the snapshot is
// all ones (depth 0); with it high the snapshot is all zeros (depth 255).
// A partially propagated carry, as a voltage drop would leave it, is
// modelled by forcing the adder sum to k low zeros: depth must read k,
// one cycle after the snapshot.
module tb_vdrop_sensor;
  localparam int W = 255;
  logic clk = 0, rst = 1, clk_ps;
  logic [W-1:0] sample;
  logic [7:0] depth;
  int checks = 0, failures = 0;
  logic clk90 = 0, clk270 = 1, late = 0;

  vdrop_sensor dut (.*);

  always #5ns clk = ~clk;
  initial begin #2.5ns forever #5ns clk90  = ~clk90;  end   // 90 degrees behind clk
  initial begin #2.5ns forever #5ns clk270 = ~clk270; end   // 270 degrees behind clk
  assign clk_ps = late ? clk270 : clk90;

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
    #22ns rst = 0;
    repeat (5) @(posedge clk);
    #1ns check(sample == '1 && depth == 0, $sformatf("quarter-period shift, depth %0d", depth));
    late = 1;
    repeat (5) @(posedge clk);
    #1ns check(sample == '0 && depth == 8'd255, $sformatf("three-quarter shift, depth %0d", depth));
    late = 0;
    repeat (4) @(posedge clk);
    for (int k = 1; k < W; k += 17) begin
      @(negedge clk) force dut.sum = {W{1'b1}} << k;
      @(posedge clk);
      @(posedge clk);
      #1ns check(depth == 8'(k), $sformatf("partial carry %0d read %0d", k, depth));
      release dut.sum;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
