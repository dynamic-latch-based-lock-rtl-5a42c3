// lfsr_obfuscator: LFSR that produces the obfuscation bits for the scan path.
//
// A W-bit LFSR in Galois form, clocked by the gated clock. Stage W-1 is the
// entry stage and stage 0 the last one; the last stage is fed back into every
// stage:
//   q[W-1] <= inject ^ q[0]
//   q[i]   <= q[i+1] ^ q[0]      for i < W-1
// with inject = cut_sig & kc_out. cut_sig is a signal taken from the circuit
// under test. On a key match kc_out is 0, nothing is injected, and the LFSR
// stays in its all-zero reset state, so it does not toggle; on a mismatch the
// CUT-dependent injection drives it through a data-dependent pseudo-random
// sequence. lfsr_out is the state, one bit per scan-path mux.
// reset (active high, asynchronous) clears the state.
//
// The AND of the CUT signal with kc_out, the zero reset state and the use of
// the bits as mux inputs follow the reference design. The feedback taps and
// the bit order are this implementation's choice; with W = 2 and the input
// sequence 1, 0, 0, 1 they give the state sequence 0, 2, 1, 3, 0 of the
// reference invalid-key waveform.
module lfsr_obfuscator #(
  parameter int W = secure_scan_pkg::lfsr_width(secure_scan_pkg::DEFAULT_KEY_W)
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         cut_sig,
  input  logic         kc_out,
  output logic [W-1:0] lfsr_out
);

  logic         inject;
  logic [W-1:0] nxt;

  assign inject = cut_sig & kc_out;

  always_comb begin
    nxt[W-1] = inject ^ lfsr_out[0];
    for (int i = 0; i < W - 1; i++) nxt[i] = lfsr_out[i+1] ^ lfsr_out[0];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) lfsr_out <= '0;
    else       lfsr_out <= nxt;
  end

endmodule
