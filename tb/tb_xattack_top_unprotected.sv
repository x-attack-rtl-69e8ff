// tb_xattack_top_unprotected: the attack against the design built without
// the protection circuit (PROTECTION = 0), at otherwise default sizes,
// with the same power-supply model as tb_xattack_top.
//  1. "half" mode, two alternating trigger-toggling plaintexts: no path
//     fails, every ciphertext is correct.
//  2. "all" mode, the same two plaintexts: the Hamming distance between
//     output and key falls to zero for the blocks in which the Trojan
//     fires; every other output is the correct ciphertext.
//  3. "all" mode, 4096 pseudorandom plaintexts: the key is recovered
//     without knowing it, as the most frequently repeated output value.
module tb_xattack_top_unprotected;
  import xattack_pkg::*;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h85458a2bb4a9aafdee2b10139e9e781a;
  localparam int N = 4096;

  logic clk = 0, clk_ps = 0, rst = 1;
  logic [127:0] victim_key = KEY, pt_data = '0, ct_data;
  logic pt_wr = 0, pt_full, ct_rd = 0, ct_empty, alarm;
  attack_mode_e atk_mode = MODE_HALF;
  logic atk_start = 0, atk_busy, atk_done, v_record = 0, v_rd = 0, v_empty;
  logic [7:0] v_data;

  xattack_top #(.PROTECTION(1'b0)) dut (.*);

  always #3.125ns clk = ~clk;
  always @(clk) clk_ps <= #1.5ns clk;

  logic f_t1, f_t2, f_ch;
  int   n_act, s_depth;
  pdn_model u_pdn (.clk, .en1(dut.u_attacker.en1), .en2(dut.u_attacker.en2),
                   .fault_trig1(f_t1), .fault_trig2(f_t2), .fault_chain(f_ch),
                   .active_ros(n_act), .sense_depth(s_depth));

  logic last_t1, last_t2, st_t1, st_t2;
  always @(negedge clk) begin
    st_t1 = last_t1; st_t2 = last_t2;
    last_t1 = !dut.u_victim.u_aes.u_trojan.s1;
    last_t2 = !dut.u_victim.u_aes.u_trojan.s2;
    if (f_t1) force dut.u_victim.u_aes.u_trojan.d1 = st_t1;
    else      release dut.u_victim.u_aes.u_trojan.d1;
    if (f_t2) force dut.u_victim.u_aes.u_trojan.d2 = st_t2;
    else      release dut.u_victim.u_aes.u_trojan.d2;
  end

  int checks = 0, failures = 0;
  int n_ok = 0, n_hd0 = 0, n_bad = 0, n_alarm = 0;
  int hist [logic [127:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst && alarm) n_alarm++;

  logic [127:0] todo [$], sent [$];
  always @(negedge clk) begin
    pt_wr = 0;
    if (!rst && todo.size() > 0 && !pt_full) begin
      pt_data = todo.pop_front();
      pt_wr = 1;
      sent.push_back(pt_data);
    end
  end

  int rdcnt = 0;
  always @(negedge clk) begin
    ct_rd = 0;
    if (!rst && !ct_empty) begin
      logic [127:0] e;
      e = aes(KEY, sent.pop_front());
      ct_rd = 1;
      rdcnt++;
      if (hist.exists(ct_data)) hist[ct_data]++; else hist[ct_data] = 1;
      if (ct_data == e) n_ok++;
      else if ($countones(ct_data ^ KEY) == 0) n_hd0++;
      else n_bad++;
    end
  end

  task automatic attack(input attack_mode_e m, input logic [127:0] pa, input logic [127:0] pb,
                        input bit random_pt);
    int target;
    target = rdcnt + N;
    @(negedge clk);
    atk_mode = m; atk_start = 1;
    @(negedge clk) atk_start = 0;
    for (int i = 0; i < N; i++)
      todo.push_back(random_pt ? {$urandom, $urandom, $urandom, $urandom} : ((i % 2) ? pb : pa));
    wait (rdcnt == target);
    wait (!atk_busy);
    repeat (10) @(posedge clk);
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pa, pb, li, c, best;
    logic [1:0] pr;
    static bit fa = 0, fb = 0;
    int bestn;
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

    attack(MODE_HALF, pa, pb, 0);
    check(n_ok == N && n_hd0 == 0 && n_bad == 0, $sformatf("half mode: %0d correct", n_ok));

    attack(MODE_ALL, pa, pb, 0);
    $display("all mode, two plaintexts: HD = 0 in %0d of %0d outputs", n_hd0, N);
    check(n_hd0 > N / 4, "key leaked with alternating plaintexts");
    check(n_bad == 0, "outputs are ciphertexts or the key");

    hist.delete();
    n_hd0 = 0;
    attack(MODE_ALL, pa, pb, 1);
    bestn = 0;
    foreach (hist[v]) if (hist[v] > bestn) begin bestn = hist[v]; best = v; end
    $display("all mode, random plaintexts: most frequent output seen %0d times", bestn);
    check(best == KEY && bestn > 10, "key recovered as the most repeated output");
    check(n_alarm == 0, "no alarm without protection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
