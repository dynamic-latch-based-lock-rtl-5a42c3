// tb_key_comparator: enters keys through the serial path and checks kc_out
// against an independent comparison: 1 while key_ready or key_valid is low,
// and afterwards 1 exactly when the captured key differs from the golden key.
// Covers the exact key, every single-bit error and random keys.
module tb_key_comparator;
  localparam int KEY_W = 8;

  logic             latch_clk = 0, key_clk = 0, reset = 0, key_in = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic             key_ready = 0, key_valid = 0;
  logic [KEY_W-1:0] key = 8'h84;
  logic [KEY_W-1:0] ff;
  logic             kc_out;
  int checks = 0, failures = 0;

  key_comparator #(.KEY_W(KEY_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load(input logic [KEY_W-1:0] k);
    for (int i = KEY_W - 1; i >= 0; i--) begin
      key_in = k[i]; #2 latch_clk = 1; #2 latch_clk = 0;
    end
    #1 key_clk = 1; #2 key_clk = 0; #1;
  endtask

  task automatic try_key(input logic [KEY_W-1:0] k);
    key_ready = 0;
    load(k);
    #1 check(kc_out == 1, "kc_out 1 before key_ready");
    key_ready = 1;
    #1 check(kc_out == (k != key), $sformatf("key %h golden %h kc_out %0b", k, key, kc_out));
    key_valid = 0;
    #1 check(kc_out == 1, "kc_out 1 without key_valid");
    key_valid = 1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 reset = 0;
    key_valid = 1;
    try_key(8'h84);
    for (int b = 0; b < KEY_W; b++) try_key(8'h84 ^ (8'h1 << b));
    key = 8'he3;
    try_key(8'h84);
    try_key(8'he3);
    for (int t = 0; t < 30; t++) begin
      key = KEY_W'($urandom);
      try_key((t % 3 == 0) ? key : KEY_W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
