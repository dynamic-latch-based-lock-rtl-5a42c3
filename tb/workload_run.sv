// workload_run: runs one configuration of the secure scan wrapper through a
// correct-key and a wrong-key session, for the workload testbench.
//
// The circuit under test is a stand-in with SL flip-flops (next state =
// state rotated by one, its end bits XORed with bits of a 4-bit input; trigger = parity of
// the state); only the flip-flop count matters for the wrapper. Checks:
//  - golden key valid KW/4 cycles after reset (one 4-bit ROM word per cycle)
//  - kc_out = 0 for the golden key, 1 for a key with one bit flipped
//  - correct key: a full scan-out returns the captured state unchanged
//  - wrong key: every scan-out bit after the first equals the LFSR bit the
//    testbench predicts, and the scan-out differs from the true state at
//    least once over the session
// done rises when finished; checks and failures are counts.
module workload_run #(
  parameter int          KW     = 8,
  parameter int          SL     = 3,
  parameter logic [63:0] GOLDEN = 64'h84
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int LW = secure_scan_pkg::lfsr_width(KW);

  logic clk = 0, latch_clk = 0, key_clk = 0, reset = 0, key_in = 0, key_ready = 0;
  logic scan_en = 0, si = 0, so, cut_sig, gated_clk, kc_out;
  logic [SL-1:0] cut_d, cut_q;
  logic [KW-1:0] ff;
  logic [LW-1:0] lfsr_out;
  logic [3:0]    pi = '0;

  always #5 clk = ~clk;

  secure_scan_top #(.KEY_W(KW), .SCAN_LEN(SL), .GOLDEN_KEY(GOLDEN)) dut (.*);

  always_comb begin
    cut_d = {cut_q[SL-2:0], cut_q[SL-1]};
    cut_d[0]    = cut_d[0] ^ (^pi);
    cut_d[SL-1] = cut_d[SL-1] ^ pi[1];
    cut_sig = ^cut_q;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL KW=%0d SL=%0d: %s", KW, SL, what);
    end
  endtask

  task automatic session(input logic [KW-1:0] k, input bit good);
    int ncyc;
    @(negedge clk);
    key_ready = 0; scan_en = 0; reset = 1;
    #2 reset = 0;
    ncyc = 0;
    while (!dut.golden_valid && ncyc < 100) begin
      @(posedge clk); #1 ncyc++;
    end
    check(ncyc == KW / 4, $sformatf("golden key after %0d cycles", ncyc));
    check(dut.golden == GOLDEN[KW-1:0], "golden key value");
    for (int i = KW - 1; i >= 0; i--) begin
      key_in = k[i]; #2 latch_clk = 1; #2 latch_clk = 0;
    end
    #1 key_clk = 1; #2 key_clk = 0;
    @(negedge clk);
    key_ready = 1;
    #1 check(kc_out == !good, "kc_out");
  endtask

  // A few functional cycles, then SL scan shifts. On a mismatch the bit
  // that reaches the last stage on each shift is LFSR bit (SL-2) mod LW,
  // sampled before that edge.
  task automatic scan_round(input bit good, inout int differ);
    logic [SL-1:0] captured;
    repeat (3) begin
      pi = 4'($urandom);
      @(negedge clk);
    end
    captured = cut_q;
    scan_en = 1;
    for (int b = 0; b < SL; b++) begin
      logic predicted;
      if (good) check(so == captured[SL-1-b], $sformatf("clean scan bit %0d", b));
      if (so != captured[SL-1-b]) differ++;
      predicted = lfsr_out[(SL-2) % LW];
      si = 1'($urandom);
      @(negedge clk);
      if (!good) check(so == predicted, $sformatf("obfuscated bit %0d", b));
    end
    scan_en = 0;
  endtask

  initial begin
    logic [KW-1:0] gk, bad;
    int differ;
    done = 0; checks = 0; failures = 0;
    gk = GOLDEN[KW-1:0];
    bad = gk ^ (KW'(1) << ($urandom % KW));
    session(gk, 1);
    differ = 0;
    repeat (3) scan_round(1, differ);
    check(differ == 0, "correct key: scan-out equals state");
    check(lfsr_out == 0, "correct key: LFSR idle");
    session(bad, 0);
    differ = 0;
    repeat (6) scan_round(0, differ);
    check(differ > 0, "wrong key: scan-out differs from state");
    done = 1;
  end
endmodule
