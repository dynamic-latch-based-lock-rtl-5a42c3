// tb_clock_gate: counts gated clock edges with the enable low and high,
// checks the gated clock equals clk while enabled, and checks that an enable
// change while clk is high does not cut or create a pulse.
module tb_clock_gate;
  logic clk = 0, reset = 0, en = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic gated_clk;
  int checks = 0, failures = 0;
  int edges = 0;

  always #5 clk = ~clk;
  always @(posedge gated_clk) edges++;

  clock_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 reset = 0;
    repeat (5) @(posedge clk);
    check(edges == 0, "no edges while disabled");
    // raise enable while clk is high: takes effect at the next rising edge
    @(posedge clk); #1 en = 1;
    #1 check(gated_clk == 0, "no pulse started mid-high");
    edges = 0;
    repeat (10) begin
      @(posedge clk); #1 check(gated_clk == 1, "gated high with clk");
      @(negedge clk); #1 check(gated_clk == 0, "gated low with clk");
    end
    check(edges == 10, $sformatf("10 edges while enabled, got %0d", edges));
    // drop enable while clk is high: current pulse completes
    @(posedge clk); #1 en = 0;
    #1 check(gated_clk == 1, "pulse not cut short");
    edges = 0;
    repeat (5) @(posedge clk);
    #1 check(edges == 0, "no edges after disable");
    en = 1;
    reset = 1;
    repeat (3) @(posedge clk);
    #1 check(gated_clk == 0, "reset closes gate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
