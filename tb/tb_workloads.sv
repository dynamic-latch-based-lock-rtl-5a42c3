// tb_workloads: the evaluated configurations of the secure scan wrapper.
// Key lengths 4, 8, 16, 32 and 64 bits (each with its LFSR of KEY_W/4 bits,
// at least 2), and scan chains as long as the flip-flop counts of the ISCAS'89
// circuits s27 (3), s298 (14), s1423 (74) and s9234 (228). Each
// configuration runs one correct-key and one wrong-key session.
module tb_workloads;
  localparam int N = 6;
  logic   done [N];
  int     c [N], f [N];
  int checks = 0, failures = 0;

  workload_run #(.KW(4),  .SL(3),   .GOLDEN(64'h9))                   w0 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  workload_run #(.KW(8),  .SL(3),   .GOLDEN(64'h84))                  w1 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  workload_run #(.KW(16), .SL(14),  .GOLDEN(64'hB7E1))                w2 (.done(done[2]), .checks(c[2]), .failures(f[2]));
  workload_run #(.KW(32), .SL(74),  .GOLDEN(64'h5A3C_96F0))           w3 (.done(done[3]), .checks(c[3]), .failures(f[3]));
  workload_run #(.KW(64), .SL(228), .GOLDEN(64'hC3A5_0F1E_9B27_D468)) w4 (.done(done[4]), .checks(c[4]), .failures(f[4]));
  workload_run #(.KW(8),  .SL(228), .GOLDEN(64'h84))                  w5 (.done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #100;
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < N; i++) begin
      checks += c[i];
      failures += f[i];
      $display("configuration %0d: checks=%0d failures=%0d", i, c[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
