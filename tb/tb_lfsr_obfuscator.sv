// tb_lfsr_obfuscator: compares the LFSR with a reference model of the
// recurrence q'[W-1] = (cut & kc) ^ q[0], q'[i] = q[i+1] ^ q[0]. Checks the
// 2-bit sequence 0, 2, 1, 3, 0 for the inputs 1, 0, 0, 1, that the LFSR stays
// at zero while kc_out is 0, and random stimulus for widths 2 and 8.
module tb_lfsr_obfuscator;
  logic clk = 0, reset = 0, cut_sig = 0, kc_out = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic [1:0] q2;
  logic [7:0] q8;
  int checks = 0, failures = 0;

  lfsr_obfuscator #(.W(2)) u2 (.clk(clk), .reset(reset), .cut_sig(cut_sig), .kc_out(kc_out), .lfsr_out(q2));
  lfsr_obfuscator #(.W(8)) u8 (.clk(clk), .reset(reset), .cut_sig(cut_sig), .kc_out(kc_out), .lfsr_out(q8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [7:0] model(input logic [7:0] q, input int w, input logic inj);
    logic [7:0] n = '0;
    for (int i = 0; i < w - 1; i++) n[i] = q[i+1] ^ q[0];
    n[w-1] = inj ^ q[0];
    return n;
  endfunction

  task automatic tick();
    #5 clk = 1; #5 clk = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m2, m8;
    logic [1:0] seq [4] = '{2'd2, 2'd1, 2'd3, 2'd0};
    logic       ins [4] = '{1'b1, 1'b0, 1'b0, 1'b1};
    #3 reset = 0;
    check(q2 == 0 && q8 == 0, "reset state zero");
    // key match: CUT activity must not move the LFSR
    kc_out = 0;
    for (int t = 0; t < 20; t++) begin
      cut_sig = 1'($urandom);
      tick();
      check(q2 == 0 && q8 == 0, "idle while kc_out is 0");
    end
    kc_out = 1;
    for (int t = 0; t < 4; t++) begin
      cut_sig = ins[t];
      tick();
      check(q2 == seq[t], $sformatf("2-bit step %0d: %0d expected %0d", t, q2, seq[t]));
    end
    m2 = {6'b0, q2}; m8 = q8;
    for (int t = 0; t < 200; t++) begin
      cut_sig = 1'($urandom);
      kc_out  = ($urandom % 4) != 0;
      m2 = model(m2, 2, cut_sig & kc_out);
      m8 = model(m8, 8, cut_sig & kc_out);
      tick();
      check(q2 == m2[1:0] && q8 == m8, $sformatf("random step %0d", t));
    end
    reset = 1; #1;
    check(q2 == 0 && q8 == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
