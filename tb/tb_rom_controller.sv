// tb_rom_controller: checks that the ROM controller delivers the golden key
// KEY_W/WORD_W clock cycles after reset, holds key_valid low until then,
// and keeps the key stable afterwards. Run for the default 8-bit key 8'h84
// and for a 64-bit key.
module tb_rom_controller;
  localparam logic [63:0] K64 = 64'hC3A5_0F1E_9B27_D468;

  logic clk = 0, reset = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic [7:0]  key8;
  logic [63:0] key64;
  logic        v8, v64;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rom_controller u8 (.clk(clk), .reset(reset), .key(key8), .key_valid(v8));
  rom_controller #(.KEY_W(64), .GOLDEN_KEY(K64)) u64 (.clk(clk), .reset(reset), .key(key64), .key_valid(v64));

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
    int n8, n64;
    n8 = -1; n64 = -1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check(!v8 && !v64, "valid low after reset");
    for (int c = 1; c <= 20; c++) begin
      @(posedge clk); #1;
      if (v8 && n8 < 0) n8 = c;
      if (v64 && n64 < 0) n64 = c;
    end
    check(n8 == 2, $sformatf("8-bit key valid after %0d cycles, expected 2", n8));
    check(n64 == 16, $sformatf("64-bit key valid after %0d cycles, expected 16", n64));
    check(key8 == 8'h84, $sformatf("8-bit key %h", key8));
    check(key64 == K64, $sformatf("64-bit key %h", key64));
    repeat (5) @(posedge clk);
    #1 check(key8 == 8'h84 && key64 == K64 && v8 && v64, "key stable");
    reset = 1; #1;
    check(!v8 && key8 == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
