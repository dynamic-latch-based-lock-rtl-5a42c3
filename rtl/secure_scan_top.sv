// secure_scan_top: scan-chain lock wrapped around a circuit under test (CUT).
//
// The wrapper keeps the CUT's scan chain locked until the correct key has
// been entered. Flow:
//  1. After reset the ROM controller reads the golden key out of its ROM.
//  2. The user shifts the key in serially on key_in (one bit per latch_clk
//     rising edge, most significant bit first); key_clk copies the latch
//     chain into the flip-flop bank.
//  3. The user raises key_ready. The clock gate starts passing clk as
//     gated_clk to the LFSR and the scan flip-flops (before that they do not
//     toggle), so the LFSR starts from its reset state, and the comparator
//     result kc_out becomes meaningful. Dropping key_ready stops the gated
//     clock again (LFSR and scan flops hold) and forces kc_out to 1.
//  4. kc_out = 0 (match): the scan chain shifts si to so unchanged.
//     kc_out = 1 (mismatch): the LFSR, driven by cut_sig & kc_out, supplies
//     the bits the chain shifts out, so so carries no CUT state.
//
// The CUT's combinational logic stays outside: it receives the scan flops'
// state on cut_q, returns its next state on cut_d and supplies one trigger
// bit cut_sig for the LFSR. clk, latch_clk and key_clk are independent
// clocks; reset is active high and asynchronous. kc_out, lfsr_out and ff are
// brought out for observation, as in the reference waveforms.
//
// The block structure follows the reference design. Parameter defaults:
// KEY_W = 8, golden key 8'h84 and a 2-bit LFSR as in the reference
// waveforms; SCAN_LEN = 3, the flip-flop count of the s27 benchmark.
module secure_scan_top #(
  parameter int          KEY_W      = secure_scan_pkg::DEFAULT_KEY_W,
  parameter int          LFSR_W     = secure_scan_pkg::lfsr_width(KEY_W),
  parameter int          SCAN_LEN   = 3,
  parameter logic [63:0] GOLDEN_KEY = secure_scan_pkg::DEFAULT_GOLDEN_KEY
) (
  input  logic                clk,
  input  logic                latch_clk,
  input  logic                key_clk,
  input  logic                reset,
  input  logic                key_in,
  input  logic                key_ready,
  input  logic                scan_en,
  input  logic                si,
  output logic                so,
  input  logic                cut_sig,
  input  logic [SCAN_LEN-1:0] cut_d,
  output logic [SCAN_LEN-1:0] cut_q,
  output logic                gated_clk,
  output logic [KEY_W-1:0]    ff,
  output logic                kc_out,
  output logic [LFSR_W-1:0]   lfsr_out
);

  logic [KEY_W-1:0] golden;
  logic             golden_valid;

  rom_controller #(.KEY_W(KEY_W), .GOLDEN_KEY(GOLDEN_KEY)) u_rom (
    .clk       (clk),
    .reset     (reset),
    .key       (golden),
    .key_valid (golden_valid)
  );

  key_comparator #(.KEY_W(KEY_W)) u_cmp (
    .latch_clk (latch_clk),
    .key_clk   (key_clk),
    .reset     (reset),
    .key_in    (key_in),
    .key_ready (key_ready),
    .key       (golden),
    .key_valid (golden_valid),
    .ff        (ff),
    .kc_out    (kc_out)
  );

  clock_gate u_cg (
    .clk       (clk),
    .reset     (reset),
    .en        (key_ready),
    .gated_clk (gated_clk)
  );

  lfsr_obfuscator #(.W(LFSR_W)) u_lfsr (
    .clk      (gated_clk),
    .reset    (reset),
    .cut_sig  (cut_sig),
    .kc_out   (kc_out),
    .lfsr_out (lfsr_out)
  );

  secure_scan_chain #(.LEN(SCAN_LEN), .LFSR_W(LFSR_W)) u_chain (
    .clk      (gated_clk),
    .reset    (reset),
    .scan_en  (scan_en),
    .si       (si),
    .kc_out   (kc_out),
    .lfsr_out (lfsr_out),
    .d_func   (cut_d),
    .q        (cut_q),
    .so       (so)
  );

endmodule
