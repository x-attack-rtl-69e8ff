// tb_xattack_victim: checks the victim region with small FIFOs (PT 16,
// CT 16 entries) so that the credit check stalls the AES pipeline.
// Phase 1: random plaintexts, a host that reads slowly; every ciphertext
// must match the reference, in order, with alarm low throughout.
// Phase 2: two plaintexts that toggle the Trojan's trigger pair every
// cycle, and a modelled timing fault on trigger path 1 only: the key must
// appear in place of every second ciphertext and nowhere else.
// Phase 3: the same with the protection's delay chain faulted as well:
// every ciphertext is replaced by zero and alarm is high.
module tb_xattack_victim;
  import xattack_pkg::*;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h85458a2bb4a9aafdee2b10139e9e781a;

  logic clk = 0, rst = 1;
  logic [127:0] key = KEY, pt_data = '0, ct_data;
  logic pt_wr = 0, pt_full, ct_rd = 0, ct_empty, alarm;
  int checks = 0, failures = 0, stalls = 0, leaks = 0, zeros = 0, alarms = 0;
  bit fault_trig = 0, fault_chain = 0;
  logic last_t, stale_t, last_c, stale_c;

  xattack_victim #(.PT_DEPTH(16), .CT_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  // Timing-fault model: a faulted flip-flop sees at its clock edge the
  // input of one cycle earlier. Inputs are sampled and forced at the
  // falling edge, when everything has settled. Trigger 1 of the (TROJAN_2)
  // Trojan has input ~s1; the chain carries the toggle flip-flop.
  always @(negedge clk) begin
    stale_t = last_t;
    stale_c = last_c;
    last_t  = !dut.u_aes.u_trojan.s1;
    last_c  = dut.g_prot.u_prot.q_tog;
    if (fault_trig)  force dut.u_aes.u_trojan.d1 = stale_t;
    else             release dut.u_aes.u_trojan.d1;
    if (fault_chain) force dut.g_prot.u_prot.chain_out = stale_c;
    else             release dut.g_prot.u_prot.chain_out;
  end

  always @(posedge clk) begin
    if (!dut.pt_empty && !dut.issue) stalls++;
    if (alarm && !rst) alarms++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [127:0] sent [$];

  // host writer: plaintexts from the queue 'todo'
  logic [127:0] todo [$];
  always @(negedge clk) begin
    pt_wr = 0;
    if (!rst && todo.size() > 0 && !pt_full) begin
      pt_data = todo.pop_front();
      pt_wr   = 1;
      sent.push_back(pt_data);
    end
  end

  // host reader: reads one ciphertext every 'slow' cycles
  int slow = 3, phase = 1, rdcnt = 0, tick = 0;
  always @(negedge clk) begin
    ct_rd = 0;
    tick++;
    if (!rst && !ct_empty && (tick % slow == 0)) begin
      logic [127:0] p, e;
      ct_rd = 1;
      p = sent.pop_front();
      e = aes(KEY, p);
      rdcnt++;
      if (phase == 1) check(ct_data == e, $sformatf("ct %h exp %h", ct_data, e));
      if (phase == 2) begin
        check(ct_data == e || ct_data == KEY, "only key or correct ciphertext");
        if (ct_data == KEY) leaks++;
      end
      if (phase == 3) begin
        check(ct_data == '0, "protected output zero under fault");
        if (ct_data == '0) zeros++;
      end
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pa, pb, li, c;
    logic [1:0] pr;
    static bit fa = 0, fb = 0;
    sbox_init();
    for (int i = 0; i < 4000 && !(fa && fb); i++) begin
      c = {$urandom, $urandom, $urandom, $urandom};
      void'(encrypt(KEY, c, li));
      pr = sdc_pair(li[127:120], 0);
      if (pr == 2'b10 && !fa) begin pa = c; fa = 1; end
      if (pr == 2'b01 && !fb) begin pb = c; fb = 1; end
    end
    check(fa && fb, "trigger-toggling plaintexts found");
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // phase 1
    for (int i = 0; i < 100; i++) todo.push_back({$urandom, $urandom, $urandom, $urandom});
    wait (rdcnt == 100);
    check(alarms == 0, "no alarm without faults");
    check(stalls > 0, "credit stall exercised");
    // phase 2: only the Trojan's slow trigger path fails
    repeat (20) @(posedge clk);
    phase = 2; slow = 1;
    fault_trig = 1;
    for (int i = 0; i < 64; i++) todo.push_back((i % 2) ? pb : pa);
    wait (rdcnt == 164);
    check(leaks == 32, $sformatf("key leaked %0d times", leaks));
    check(alarms == 0, "no alarm while the chain meets timing");
    // phase 3: the delay chain fails as well
    repeat (20) @(posedge clk);
    fault_chain = 1;
    repeat (3) @(posedge clk);
    phase = 3;
    for (int i = 0; i < 64; i++) todo.push_back((i % 2) ? pb : pa);
    wait (rdcnt == 228);
    check(zeros == 64 && alarms > 60, $sformatf("zeroed %0d, alarms %0d", zeros, alarms));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
