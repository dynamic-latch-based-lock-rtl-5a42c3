// tb_secure_scan_chain: checks functional capture, clean shifting with
// kc_out = 0 (si appears at so after LEN shifts) and, with kc_out = 1, that
// each stage after the first loads LFSR bit (i-1) mod LFSR_W. Uses an
// independent model of the chain contents.
module tb_secure_scan_chain;
  localparam int LEN = 5;
  localparam int LW  = 2;

  logic clk = 0, reset = 0, scan_en = 0, si = 0, kc_out = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic [LW-1:0]  lfsr_out = '0;
  logic [LEN-1:0] d_func = '0, q;
  logic           so;
  int checks = 0, failures = 0;

  secure_scan_chain #(.LEN(LEN), .LFSR_W(LW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

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
    logic [LEN-1:0] m;
    #3 reset = 0;
    check(q == 0, "reset");
    for (int t = 0; t < 300; t++) begin
      scan_en  = ($urandom % 4) != 0;
      kc_out   = ($urandom % 3) == 0;
      si       = 1'($urandom);
      lfsr_out = LW'($urandom);
      d_func   = LEN'($urandom);
      m = q;
      if (!scan_en) m = d_func;
      else begin
        for (int i = LEN - 1; i >= 1; i--) m[i] = kc_out ? lfsr_out[(i-1) % LW] : q[i-1];
        m[0] = si;
      end
      tick();
      check(q == m, $sformatf("step %0d q=%b expected %b", t, q, m));
      check(so == q[LEN-1], "so is last stage");
    end
    // clean shift: a pattern entered on si leaves so LEN cycles later
    scan_en = 1; kc_out = 0;
    begin
      logic [15:0] pat = 16'hB38D;
      for (int t = 0; t < 16 + LEN; t++) begin
        si = (t < 16) ? pat[t] : 1'b0;
        tick();
        if (t >= LEN - 1 && t - (LEN - 1) < 16)
          check(so == pat[t-(LEN-1)], $sformatf("clean shift bit %0d", t - (LEN - 1)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
