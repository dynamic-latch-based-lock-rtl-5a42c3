// key_generator: serial key entry through a latch chain and a parallel
// flip-flop bank.
//
// The user shifts the key in one bit per latch_clk rising edge on key_in. The
// chain has KEY_W stages; stage 0 takes key_in and stage i takes stage i-1, so
// after KEY_W shifts the first bit entered sits in stage KEY_W-1 (the key is
// entered most significant bit first). On each key_clk rising edge the bank of
// KEY_W flip-flops copies the whole chain, ff[i] <= stage i. Because latch_clk
// and key_clk are separate, the key can be loaded while the rest of the scan
// logic is idle. reset clears chain and bank asynchronously (active high).
//
// The chain/bank structure, the two clocks, the bit order of ff and the reset
// follow the reference design. The chain stages are written as edge-triggered
// storage on latch_clk: a chain of level-sensitive latches that are all open
// in the same clock phase would let a bit race through every stage, so each
// stage here is one bit of storage updated once per latch_clk cycle.
module key_generator #(
  parameter int KEY_W = secure_scan_pkg::DEFAULT_KEY_W
) (
  input  logic             latch_clk,
  input  logic             key_clk,
  input  logic             reset,
  input  logic             key_in,
  output logic [KEY_W-1:0] ff
);

  logic [KEY_W-1:0] chain;

  always_ff @(posedge latch_clk or posedge reset) begin
    if (reset) chain <= '0;
    else       chain <= {chain[KEY_W-2:0], key_in};
  end

  always_ff @(posedge key_clk or posedge reset) begin
    if (reset) ff <= '0;
    else       ff <= chain;
  end

endmodule
