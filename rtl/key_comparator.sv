// key_comparator: key entry plus the golden-key check that produces kc_out.
//
// It holds the key_generator (latch chain and flip-flop bank) and compares
// the captured key ff with the golden key from the ROM: each bit pair is
// XORed and the KEY_W results are OR-reduced into one bit, kc_out, which is 1
// on a mismatch. Until the user raises key_ready (and the ROM has delivered
// its key, key_valid) the comparison is not used and kc_out stays 1, so the
// scan path is locked by default. The result is combinational from ff, key,
// key_ready and key_valid: kc_out falls in the same cycle key_ready rises on a
// correct key.
//
// The XOR bank, OR tree, kc_out polarity and key_ready enable follow the
// reference design. Forcing kc_out to 1 while not enabled is a choice of this
// implementation.
module key_comparator #(
  parameter int KEY_W = secure_scan_pkg::DEFAULT_KEY_W
) (
  input  logic             latch_clk,
  input  logic             key_clk,
  input  logic             reset,
  input  logic             key_in,
  input  logic             key_ready,
  input  logic [KEY_W-1:0] key,
  input  logic             key_valid,
  output logic [KEY_W-1:0] ff,
  output logic             kc_out
);

  logic [KEY_W-1:0] diff;

  key_generator #(.KEY_W(KEY_W)) u_keygen (
    .latch_clk (latch_clk),
    .key_clk   (key_clk),
    .reset     (reset),
    .key_in    (key_in),
    .ff        (ff)
  );

  assign diff   = ff ^ key;
  assign kc_out = !(key_ready && key_valid) || (|diff);

endmodule
