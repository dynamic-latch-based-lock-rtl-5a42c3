// tb_secure_scan_top: end-to-end test of the secure scan wrapper at its
// default parameters (8-bit key, golden key 8'h84, 2-bit LFSR, 3 scan flops)
// around an s27 model. The s27 output G17 is the LFSR trigger cut_sig.
//
// Sessions: reset, serial key entry, key_ready, functional cycles, then scan
// shifting. The testbench keeps its own model of the s27 state, the LFSR and
// the scan chain and compares cut_q, lfsr_out and so every cycle. It counts
// each mechanism and fails if one never happened:
//   gate_closed   no gated clock edge while key_ready is low
//   rom_load      golden key valid two cycles after reset
//   key_match     kc_out = 0 after the correct key
//   key_mismatch  kc_out = 1 after a wrong key
//   func_capture  functional capture matches s27
//   clean_shift   a scan-out bit equals the true CUT state / si stream
//   lfsr_active   LFSR left zero on a mismatch
//   obfuscated    a scan-out bit differed from the unobfuscated value
//   gate_pause    dropping key_ready stopped the scan clock, LFSR and flops held
module tb_secure_scan_top;
  localparam int KW = 8;
  localparam int LW = 2;
  localparam int SL = 3;

  logic clk = 0, latch_clk = 0, key_clk = 0, reset = 0, key_in = 0, key_ready = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic scan_en = 0, si = 0, so, cut_sig, gated_clk, kc_out;
  logic [SL-1:0] cut_d, cut_q;
  logic [KW-1:0] ff;
  logic [LW-1:0] lfsr_out;
  logic [3:0]    pi = '0;

  int checks = 0, failures = 0;
  int gate_edges = 0;
  int n_gate_closed = 0, n_rom_load = 0, n_key_match = 0, n_key_mismatch = 0;
  int n_func_capture = 0, n_clean_shift = 0, n_lfsr_active = 0, n_obfuscated = 0;
  int n_gate_pause = 0;

  always #5 clk = ~clk;
  always @(posedge gated_clk) gate_edges++;

  secure_scan_top dut (.*);
  s27_model cut (.pi(pi), .state(cut_q), .next(cut_d), .g17(cut_sig));

  // reference state of the testbench
  logic [SL-1:0] m_q, m_clean;
  logic [LW-1:0] m_l;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [SL-1:0] s27_next(input logic [3:0] p, input logic [SL-1:0] s);
    logic g8, g9, g11, g12;
    g12 = !(p[1] || s[2]);
    g8  = !p[0] && s[1];
    g9  = !((p[3] || g8) && (g12 || g8));
    g11 = !(s[0] || g9);
    return {!(p[2] || g12), g11, !(!p[0] || g11)};
  endfunction

  task automatic enter_key(input logic [KW-1:0] k);
    for (int i = KW - 1; i >= 0; i--) begin
      key_in = k[i]; #3 latch_clk = 1; #3 latch_clk = 0;
    end
    #2 key_clk = 1; #3 key_clk = 0;
  endtask

  // Start a session: reset, key entry, key_ready. Returns at a negedge of clk.
  task automatic session(input logic [KW-1:0] k, input bit expect_match);
    @(negedge clk);
    key_ready = 0; scan_en = 0; reset = 1;
    #2 reset = 0;
    m_q = '0; m_l = '0;
    @(posedge clk); @(posedge clk); #1;
    check(dut.golden_valid && dut.golden == 8'h84, "golden key loaded after two cycles");
    n_rom_load++;
    gate_edges = 0;
    enter_key(k);
    repeat (4) @(posedge clk);
    check(gate_edges == 0, "gated clock idle before key_ready");
    check(kc_out == 1, "kc_out 1 before key_ready");
    if (gate_edges == 0) n_gate_closed++;
    check(ff == k, "captured key");
    @(negedge clk);
    key_ready = 1;
    #1 check(kc_out == !expect_match, $sformatf("kc_out %0b for key %h", kc_out, k));
    if (expect_match && !kc_out) n_key_match++;
    if (!expect_match && kc_out) n_key_mismatch++;
  endtask

  // One gated clock cycle with the given inputs; compares with the model.
  task automatic cycle(input bit se, input bit sin, input logic [3:0] p);
    logic [SL-1:0] nq;
    logic [LW-1:0] nl;
    logic          inj;
    scan_en = se; si = sin; pi = p;
    #1;
    inj = s27_g17(p, m_q) & kc_out;
    nl[LW-1] = inj ^ m_l[0];
    for (int i = 0; i < LW - 1; i++) nl[i] = m_l[i+1] ^ m_l[0];
    if (!se) nq = s27_next(p, m_q);
    else begin
      nq[0] = sin;
      for (int i = 1; i < SL; i++) nq[i] = kc_out ? m_l[(i-1) % LW] : m_q[i-1];
    end
    m_q = nq; m_l = nl;
    @(posedge clk); #1;
    check(cut_q == m_q, $sformatf("state %b expected %b at %0t se=%0b kc=%0b", cut_q, m_q, $time, se, kc_out));
    check(lfsr_out == m_l, $sformatf("lfsr %0d expected %0d", lfsr_out, m_l));
    if (m_l != 0) n_lfsr_active++;
    @(negedge clk);
  endtask

  function automatic logic s27_g17(input logic [3:0] p, input logic [SL-1:0] s);
    logic [SL-1:0] n = s27_next(p, s);
    return !n[1];
  endfunction

  // Functional cycles followed by a scan-out of the state; the clean value
  // of each scan-out bit is the captured state, stage SL-1 first.
  task automatic run_and_scan(input int nfunc);
    for (int c = 0; c < nfunc; c++) begin
      cycle(0, 0, 4'($urandom));
      n_func_capture++;
    end
    m_clean = m_q;
    for (int b = 0; b < SL + 4; b++) begin
      logic clean;
      clean = (b < SL) ? m_clean[SL-1-b] : 1'b0;
      check(so == m_q[SL-1], "so is last scan stage");
      if (so != clean) n_obfuscated++;
      else if (!kc_out && b < SL) n_clean_shift++;
      if (!kc_out) check(so == clean, $sformatf("clean scan-out bit %0d", b));
      cycle(1, 0, 4'($urandom));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // correct key 8'h84
    for (int s = 0; s < 3; s++) begin
      session(8'h84, 1);
      for (int r = 0; r < 4; r++) run_and_scan(3 + r);
      check(lfsr_out == 0, "LFSR idle on key match");
    end
    // wrong keys: 8'he3, single-bit errors and random keys
    session(8'he3, 0);
    for (int r = 0; r < 6; r++) run_and_scan(3 + r);
    // pause: key_ready low stops the scan clock; LFSR and flops hold
    for (int p = 0; p < 3; p++) begin
      logic [SL-1:0] held;
      logic [LW-1:0] lheld;
      held = cut_q; lheld = lfsr_out;
      key_ready = 0;
      #1 check(kc_out == 1, "kc_out 1 while key_ready low");
      gate_edges = 0;
      repeat (4) @(posedge clk);
      #1 check(gate_edges == 0 && cut_q == held && lfsr_out == lheld, "scan flops and LFSR hold while gated");
      if (gate_edges == 0) n_gate_pause++;
      @(negedge clk);
      key_ready = 1;
      for (int r = 0; r < 3; r++) run_and_scan(2 + r);
    end
    for (int s = 0; s < 8; s++) begin
      logic [KW-1:0] k;
      k = (s < 4) ? (8'h84 ^ (8'h1 << (2 * s))) : KW'($urandom);
      if (k == 8'h84) k = 8'h85;
      session(k, 0);
      for (int r = 0; r < 4; r++) run_and_scan(2 + r);
    end
    $display("mechanisms: gate_closed=%0d rom_load=%0d key_match=%0d key_mismatch=%0d",
             n_gate_closed, n_rom_load, n_key_match, n_key_mismatch);
    $display("            func_capture=%0d clean_shift=%0d lfsr_active=%0d obfuscated=%0d",
             n_func_capture, n_clean_shift, n_lfsr_active, n_obfuscated);
    $display("            gate_pause=%0d", n_gate_pause);
    check(n_gate_closed > 0, "gate_closed happened");
    check(n_rom_load > 0, "rom_load happened");
    check(n_key_match > 0, "key_match happened");
    check(n_key_mismatch > 0, "key_mismatch happened");
    check(n_func_capture > 0, "func_capture happened");
    check(n_clean_shift > 0, "clean_shift happened");
    check(n_lfsr_active > 0, "lfsr_active happened");
    check(n_obfuscated > 0, "obfuscated happened");
    check(n_gate_pause > 0, "gate_pause happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
