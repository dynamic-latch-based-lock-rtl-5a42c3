// tb_key_generator: self-checking test of the serial latch chain and the
// parallel capture bank. Random keys are shifted in most significant bit
// first on latch_clk; ff must stay unchanged until key_clk ticks and then
// equal the key. A partial load is checked against a reference shift model,
// and reset must clear ff.
module tb_key_generator;
  localparam int KEY_W = 8;

  logic             latch_clk = 0, key_clk = 0, reset = 0, key_in = 0;
  initial #1 reset = 1;  // a rising edge, so the asynchronous resets act
  logic [KEY_W-1:0] ff;
  int checks = 0, failures = 0;

  key_generator #(.KEY_W(KEY_W)) dut (.*);

  task automatic check(input logic [KEY_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic shift_bit(input logic b);
    key_in = b; #2 latch_clk = 1; #2 latch_clk = 0;
  endtask

  task automatic capture();
    #1 key_clk = 1; #2 key_clk = 0; #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KEY_W-1:0] k, model;
    #5 reset = 0;
    check(ff, '0, "after reset");
    // Fig. 7 key 8'h84 and its intermediate captures every two shifts.
    model = '0;
    k = 8'h84;
    for (int i = KEY_W - 1; i >= 0; i--) begin
      logic [KEY_W-1:0] held;
      held = ff;
      shift_bit(k[i]);
      model = {model[KEY_W-2:0], k[i]};
      check(ff, held, "ff holds without key_clk");
      if (i % 2 == 0) begin
        capture();
        check(ff, model, "partial capture");
      end
    end
    check(ff, 8'h84, "full key 84");
    for (int t = 0; t < 20; t++) begin
      logic [KEY_W-1:0] prev;
      k = KEY_W'($urandom);
      prev = ff;
      for (int i = KEY_W - 1; i >= 0; i--) shift_bit(k[i]);
      check(ff, prev, "ff unchanged before capture");
      capture();
      check(ff, k, "random key");
    end
    reset = 1; #1;
    check(ff, '0, "reset clears ff");
    reset = 0;
    capture();
    check(ff, '0, "reset clears chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
