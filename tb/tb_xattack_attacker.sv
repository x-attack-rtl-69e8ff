// tb_xattack_attacker: checks the attacker region with short runs (64
// cycles), small banks (16 oscillators) and a 32-entry V FIFO: an attack
// in "all" mode starts both banks oscillating for exactly 64 cycles and
// stops them; "half" mode runs bank 1 only; sensor readings are written
// into the V FIFO while recording, one per cycle, until it is full; the
// host reads them back in order. The sensor's carry depth is set through
// its adder sum to a known sequence.
module tb_xattack_attacker;
  import xattack_pkg::*;
  logic clk = 0, rst = 1, clk_ps = 0;
  attack_mode_e mode = MODE_ALL;
  logic start = 0, busy, done, v_record = 0, v_rd = 0, v_empty;
  logic [7:0] v_data;
  int checks = 0, failures = 0, e1 = 0, e2 = 0, nbusy = 0;
  int depth_seq = 0;

  xattack_attacker #(.ATTACK_CYCLES(64), .N_RO(16), .V_DEPTH(32)) dut (.*);

  always #5ns clk = ~clk;
  always @(dut.ro1[3]) e1++;
  always @(dut.ro2[5]) e2++;
  always @(posedge clk) if (busy) nbusy++;

  // the carry travels depth_seq bits; depth_seq counts cycles
  always @(negedge clk) depth_seq = (depth_seq + 1) % 200;
  initial force dut.u_sensor.sum = {255{1'b1}} << depth_seq;

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
    int first, n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    e1 = 0; e2 = 0;
    repeat (10) @(negedge clk);
    check(e1 == 0 && e2 == 0, "banks idle");
    mode = MODE_ALL; start = 1;
    @(negedge clk) start = 0;
    repeat (80) @(negedge clk);
    check(nbusy == 64, $sformatf("attack length %0d", nbusy));
    check(e1 > 500 && e2 > 500, $sformatf("both banks oscillated (%0d, %0d)", e1, e2));
    e1 = 0; e2 = 0;
    repeat (10) @(negedge clk);
    check(e1 == 0 && e2 == 0, "banks stopped after the attack");
    mode = MODE_HALF; start = 1;
    @(negedge clk) start = 0;
    repeat (80) @(negedge clk);
    check(e1 > 500 && e2 == 0, "half mode: bank 1 only");
    check(v_empty, "nothing recorded while v_record is low");
    // recording: 40 cycles into a 32-entry FIFO
    v_record = 1;
    first = -1;
    repeat (40) @(negedge clk);
    v_record = 0;
    check(dut.v_full, "V FIFO full");
    n = 0;
    while (!v_empty) begin
      if (first < 0) first = v_data;
      else check(v_data == 8'((first + n) % 200), $sformatf("reading %0d = %0d", n, v_data));
      v_rd = 1; n++;
      @(negedge clk) v_rd = 0;
    end
    check(n == 32, $sformatf("%0d readings", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
