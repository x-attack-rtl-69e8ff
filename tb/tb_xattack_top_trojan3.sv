// tb_xattack_top_trojan3: the countermeasure experiment with the slowed
// Trojan-3 form of the Trojan (VARIANT = TROJAN_3), protection on, runs of
// 1024 cycles and 1024-entry FIFOs, same power-supply model as
// tb_xattack_top. Two plaintexts are chosen so that the transformed
// trigger pair (t1, t2) alternates between (1,0) and (0,1). Without an
// attack every ciphertext is correct. Under an "all" attack the Trojan
// fires inside the core, yet the key never reaches the CT FIFO: the
// protection has blanked those outputs to zero.
module tb_xattack_top_trojan3;
  import xattack_pkg::*;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h85458a2bb4a9aafdee2b10139e9e781a;
  localparam int N = 1024;

  logic clk = 0, clk_ps = 0, rst = 1;
  logic [127:0] victim_key = KEY, pt_data = '0, ct_data;
  logic pt_wr = 0, pt_full, ct_rd = 0, ct_empty, alarm;
  attack_mode_e atk_mode = MODE_ALL;
  logic atk_start = 0, atk_busy, atk_done, v_record = 0, v_rd = 0, v_empty;
  logic [7:0] v_data;

  xattack_top #(.VARIANT(TROJAN_3), .PT_DEPTH(N), .CT_DEPTH(N), .ATTACK_CYCLES(N),
                .V_DEPTH(N)) dut (.*);

  always #3.125ns clk = ~clk;
  always @(clk) clk_ps <= #1.5ns clk;

  logic f_t1, f_t2, f_ch;
  int   n_act, s_depth;
  pdn_model u_pdn (.clk, .en1(dut.u_attacker.en1), .en2(dut.u_attacker.en2),
                   .fault_trig1(f_t1), .fault_trig2(f_t2), .fault_chain(f_ch),
                   .active_ros(n_act), .sense_depth(s_depth));

  // Trigger inputs of TROJAN_3: d1 = ~(s1&s2 | x&y), d2 = ~(s1&s2 | ~x&y).
  logic last_t1, last_t2, last_c, st_t1, st_t2, st_c;
  always @(negedge clk) begin
    logic s1, s2, x, y;
    s1 = dut.u_victim.u_aes.u_trojan.s1;
    s2 = dut.u_victim.u_aes.u_trojan.s2;
    x  = dut.u_victim.u_aes.u_trojan.x;
    y  = dut.u_victim.u_aes.u_trojan.y;
    st_t1 = last_t1; st_t2 = last_t2; st_c = last_c;
    last_t1 = !((s1 & s2) | (x & y));
    last_t2 = !((s1 & s2) | (!x & y));
    last_c  = dut.u_victim.g_prot.u_prot.q_tog;
    if (f_t1) force dut.u_victim.u_aes.u_trojan.d1 = st_t1;
    else      release dut.u_victim.u_aes.u_trojan.d1;
    if (f_t2) force dut.u_victim.u_aes.u_trojan.d2 = st_t2;
    else      release dut.u_victim.u_aes.u_trojan.d2;
    if (f_ch) force dut.u_victim.g_prot.u_prot.chain_out = st_c;
    else      release dut.u_victim.g_prot.u_prot.chain_out;
  end

  int checks = 0, failures = 0, fires = 0, alarms = 0;
  int n_ok = 0, n_zero = 0, n_key = 0, n_bad = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (alarm) alarms++;
    if (dut.u_victim.u_aes.out_valid && dut.u_victim.u_aes.ct == KEY) fires++;
  end

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
      if (ct_data == e) n_ok++;
      else if (ct_data == '0) n_zero++;
      else if (ct_data == KEY) n_key++;
      else n_bad++;
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pa, pb, li, c;
    logic [7:0] sb;
    static bit fa = 0, fb = 0;
    sbox_init();
    for (int i = 0; i < 4000 && !(fa && fb); i++) begin
      c = {$urandom, $urandom, $urandom, $urandom};
      void'(encrypt(KEY, c, li));
      sb = li[127:120];
      if (sb[0] && (^sb[6:1]) && !fa)  begin pa = c; fa = 1; end   // (t1,t2) = (1,0)
      if (sb[0] && !(^sb[6:1]) && !fb) begin pb = c; fb = 1; end   // (t1,t2) = (0,1)
    end
    check(fa && fb, "trigger-toggling plaintexts found");
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    for (int i = 0; i < N; i++) todo.push_back((i % 2) ? pb : pa);
    wait (rdcnt == N);
    check(n_ok == N && fires == 0 && alarms == 0, "no attack: all correct, silent");

    @(negedge clk) atk_start = 1;
    @(negedge clk) atk_start = 0;
    for (int i = 0; i < N; i++) todo.push_back((i % 2) ? pb : pa);
    wait (rdcnt == 2 * N);
    wait (!atk_busy);
    $display("Trojan-3 fired %0d times inside the core; outputs: correct %0d, zero %0d, key %0d",
             fires, n_ok, n_zero, n_key);
    check(fires > N / 4, "Trojan-3 fired under attack");
    check(alarms > 0, "protection alarm raised");
    check(n_key == 0 && n_bad == 0, "key never reached the output");
    check(n_zero > N / 2, "outputs blanked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
