// tb_xattack_top: end-to-end run of the whole shared-FPGA design at its
// default sizes (4096-entry FIFOs, 4096-cycle attacks, two banks of 9500
// oscillators, protection on, Trojan-2).
//
// A behavioural model of the shared power supply (pdn_model) turns the
// attacker's bank enables into timing faults of the victim: a faulted
// flip-flop sees the input it had one cycle earlier. The same model sets
// the carry depth the voltage sensor captures.
//  1. Validation: 8256 random plaintexts with a host that first lets the
//     CT FIFO fill (the pipeline stalls, the PT FIFO fills up), then
//     drains it; every ciphertext must be correct and alarm must stay low.
//  2. Three attack runs in the order periodic, half, all, each with 4096
//     encryptions of two alternating plaintexts that toggle the Trojan's
//     trigger pair every cycle, with sensor recording on. The Trojan must
//     fire inside the core in the periodic and all runs and not in the half
//     run; the protection must raise alarm in every run; the key must never
//     reach the CT FIFO, every output is the correct ciphertext or zero.
//  3. The sensor readings must show a shallower carry while banks run, and
//     recording past 4096 readings must find the V FIFO full.
module tb_xattack_top;
  import xattack_pkg::*;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h85458a2bb4a9aafdee2b10139e9e781a;
  localparam int N = 4096;

  logic clk = 0, clk_ps = 0, rst = 1;
  logic [127:0] victim_key = KEY, pt_data = '0, ct_data;
  logic pt_wr = 0, pt_full, ct_rd = 0, ct_empty, alarm;
  attack_mode_e atk_mode = MODE_PERIODIC;
  logic atk_start = 0, atk_busy, atk_done, v_record = 0, v_rd = 0, v_empty;
  logic [7:0] v_data;

  xattack_top dut (.*);

  always #3.125ns clk = ~clk;            // 160 MHz
  always @(clk) clk_ps <= #1.5ns clk;

  // ---------------------------------------------------------------- model
  logic f_t1, f_t2, f_ch;
  int   n_act, s_depth;
  pdn_model u_pdn (.clk, .en1(dut.u_attacker.en1), .en2(dut.u_attacker.en2),
                   .fault_trig1(f_t1), .fault_trig2(f_t2), .fault_chain(f_ch),
                   .active_ros(n_act), .sense_depth(s_depth));

  logic last_t1, last_t2, last_c, st_t1, st_t2, st_c;
  logic [254:0] sense_word;
  always @(negedge clk) begin
    st_t1 = last_t1; st_t2 = last_t2; st_c = last_c;
    last_t1 = !dut.u_victim.u_aes.u_trojan.s1;
    last_t2 = !dut.u_victim.u_aes.u_trojan.s2;
    last_c  = dut.u_victim.g_prot.u_prot.q_tog;
    if (f_t1) force dut.u_victim.u_aes.u_trojan.d1 = st_t1;
    else      release dut.u_victim.u_aes.u_trojan.d1;
    if (f_t2) force dut.u_victim.u_aes.u_trojan.d2 = st_t2;
    else      release dut.u_victim.u_aes.u_trojan.d2;
    if (f_ch) force dut.u_victim.g_prot.u_prot.chain_out = st_c;
    else      release dut.u_victim.g_prot.u_prot.chain_out;
    sense_word = {255{1'b1}} << s_depth;
  end
  initial force dut.u_attacker.u_sensor.sum = sense_word;

  // ---------------------------------------------------------- bookkeeping
  int checks = 0, failures = 0;
  int stalls = 0, pt_fulls = 0, fires = 0, alarms = 0, dones = 0, ro_edges = 0;
  int n_ok = 0, n_zero = 0, n_key = 0, n_bad = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (!dut.u_victim.pt_empty && !dut.u_victim.issue) stalls++;
    if (pt_full) pt_fulls++;
    if (alarm) alarms++;
    if (atk_done) dones++;
    if (dut.u_victim.u_aes.out_valid && dut.u_victim.aes_ct == KEY) fires++;
  end
  always @(dut.u_attacker.ro1[0]) ro_edges++;

  // host writer
  logic [127:0] todo [$], sent [$];
  always @(negedge clk) begin
    pt_wr = 0;
    if (!rst && todo.size() > 0 && !pt_full) begin
      pt_data = todo.pop_front();
      pt_wr = 1;
      sent.push_back(pt_data);
    end
  end

  // host reader
  bit reading = 0;
  int rdcnt = 0;
  always @(negedge clk) begin
    ct_rd = 0;
    if (!rst && reading && !ct_empty) begin
      logic [127:0] e;
      e = aes(KEY, sent.pop_front());
      ct_rd = 1;
      rdcnt++;
      if (ct_data == e) n_ok++;
      else if (ct_data == '0) n_zero++;
      else if (ct_data == KEY) n_key++;
      else n_bad++;
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pa, pb, li, c;
    logic [1:0] pr;
    static bit fa = 0, fb = 0;
    int f0, a0, target, vcount, vsum_idle, vn_idle, vmin;
    static attack_mode_e modes [3] = '{MODE_PERIODIC, MODE_HALF, MODE_ALL};
    int fired [3], alarmed [3];

    sbox_init();
    for (int i = 0; i < 4000 && !(fa && fb); i++) begin
      c = {$urandom, $urandom, $urandom, $urandom};
      void'(encrypt(KEY, c, li));
      pr = sdc_pair(li[127:120], 0);
      if (pr == 2'b10 && !fa) begin pa = c; fa = 1; end
      if (pr == 2'b01 && !fb) begin pb = c; fb = 1; end
    end
    check(fa && fb, "trigger-toggling plaintexts found");
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. validation with back-pressure
    for (int i = 0; i < 2 * N + 64; i++) todo.push_back({$urandom, $urandom, $urandom, $urandom});
    wait (pt_full);
    repeat (50) @(posedge clk);
    reading = 1;
    wait (rdcnt == 2 * N + 64);
    check(n_ok == 2 * N + 64 && n_bad == 0 && n_key == 0 && n_zero == 0, "validation ciphertexts correct");
    check(alarms == 0, "no alarm without attack");
    check(stalls > 0, "pipeline stalled on full CT FIFO");
    check(pt_fulls > 0, "PT FIFO filled up");
    check(ro_edges <= 2, "oscillators idle without attack");

    // 2. attack runs
    target = rdcnt;
    for (int m = 0; m < 3; m++) begin
      f0 = fires; a0 = alarms;
      @(negedge clk);
      atk_mode = modes[m]; atk_start = 1; v_record = (m == 2);
      @(negedge clk) atk_start = 0;
      for (int i = 0; i < N; i++) todo.push_back((i % 2) ? pb : pa);
      target += N;
      wait (rdcnt == target);
      wait (!atk_busy);
      repeat (20) @(posedge clk);
      fired[m] = fires - f0; alarmed[m] = alarms - a0;
      $display("mode %s: Trojan fired %0d, alarm cycles %0d", modes[m].name(), fired[m], alarmed[m]);
    end
    check(fired[0] > 0, "Trojan fired in periodic mode");
    check(fired[1] == 0, "Trojan silent in half mode");
    check(fired[2] > 1000, "Trojan fired in all mode");
    for (int m = 0; m < 3; m++) check(alarmed[m] > 0, "protection alarm in every mode");
    check(dones == 3, "each attack ended by the hardware");
    check(ro_edges > 1000, "oscillators ran");
    check(n_key == 0, $sformatf("key never reached the output (%0d)", n_key));
    check(n_bad == 0, "every output correct or zero");
    check(n_zero > 0, "protected outputs zeroed");

    // 3. sensor readings of the last (all-banks) run, plus 200 idle cycles
    repeat (200) @(posedge clk);
    @(negedge clk) v_record = 0;
    check(dut.u_attacker.v_full, "V FIFO full after recording past its depth");
    vcount = 0; vsum_idle = 0; vn_idle = 0; vmin = 255;
    while (!v_empty) begin
      @(negedge clk);
      if (v_data < vmin) vmin = v_data;
      if (v_data > 150) begin vsum_idle += v_data; vn_idle++; end
      v_rd = 1; vcount++;
      @(negedge clk) v_rd = 0;
    end
    check(vcount == N, $sformatf("%0d sensor readings", vcount));
    check(vmin < 150 && vn_idle > 0, $sformatf("carry depth drops under attack (min %0d)", vmin));

    $display("outputs: correct %0d, zero %0d, key %0d, other %0d; stalls %0d",
             n_ok, n_zero, n_key, n_bad, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
