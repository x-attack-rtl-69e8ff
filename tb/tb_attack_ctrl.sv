// tb_attack_ctrl: runs one attack in each mode with the default length of
// 4096 cycles and checks the length of the run, the done pulse, the
// enable patterns (periodic: in phase, 12 of every 16 cycles = 75 %;
// half: bank 1 only; all: both banks), that a second start during a run is
// ignored and that both enables stay low while idle.
module tb_attack_ctrl;
  import xattack_pkg::*;
  localparam int N = 4096;
  logic clk = 0, rst = 1, start = 0;
  attack_mode_e mode = MODE_PERIODIC;
  logic busy, done, en1, en2;
  int checks = 0, failures = 0;

  attack_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input attack_mode_e m, output int nbusy, output int n1, output int n2,
                     output int ndone, output int nmismatch, output int nrise);
    logic prev;
    nbusy = 0; n1 = 0; n2 = 0; ndone = 0; nmismatch = 0; nrise = 0; prev = 0;
    @(negedge clk) begin mode = m; start = 1; end
    @(negedge clk) start = 0;
    for (int i = 0; i < N + 20; i++) begin
      if (i == 100) start = 1;       // ignored: attack in progress
      if (i == 101) start = 0;
      if (busy) nbusy++;
      if (en1) n1++;
      if (en2) n2++;
      if (done) ndone++;
      if (en1 != en2) nmismatch++;
      if (en1 && !prev) nrise++;
      if (!busy) check(!en1 && !en2, "idle enables low");
      prev = en1;
      @(negedge clk);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, a, b, d, mm, r;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    check(!busy && !en1 && !en2, "idle after reset");
    run(MODE_PERIODIC, nb, a, b, d, mm, r);
    check(nb == N, $sformatf("periodic length %0d", nb));
    check(a == N * 12 / 16 && b == a, $sformatf("periodic duty %0d/%0d", a, b));
    check(mm == 0, "periodic enables in phase");
    check(r == N / 16, $sformatf("periodic pulses %0d", r));
    check(d == 1, "one done pulse");
    run(MODE_HALF, nb, a, b, d, mm, r);
    check(nb == N && a == N && b == 0 && d == 1, "half mode");
    run(MODE_ALL, nb, a, b, d, mm, r);
    check(nb == N && a == N && b == N && d == 1 && mm == 0, "all mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
