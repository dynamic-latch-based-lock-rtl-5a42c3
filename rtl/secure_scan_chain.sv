// secure_scan_chain: the scan flip-flops of the circuit under test with the
// obfuscation muxes between them.
//
// LEN mux-D scan flip-flops, all clocked by the gated clock. With scan_en = 0
// each flop captures its functional next-state bit d_func[i] from the CUT.
// With scan_en = 1 the chain shifts from stage 0 (fed by si) towards stage
// LEN-1 (which drives so). Between stage i-1 and stage i sits a 2:1 mux:
// kc_out = 0 (key match) selects stage i-1, so the chain shifts untouched;
// kc_out = 1 (mismatch) selects LFSR bit (i-1) mod LFSR_W, so what reaches so
// is LFSR data instead of the CUT's state. q gives the flops' state back to
// the CUT. reset (active high, asynchronous) clears the flops.
//
// The chain of scan flops with a mux after each one, fed by the LFSR and
// selected by the comparator result, follows the reference design. The mux
// select being kc_out, the mod-LFSR_W assignment of LFSR bits to muxes and
// the reset of the scan flops are choices of this implementation.
module secure_scan_chain #(
  parameter int LEN    = 3,
  parameter int LFSR_W = secure_scan_pkg::lfsr_width(secure_scan_pkg::DEFAULT_KEY_W)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              scan_en,
  input  logic              si,
  input  logic              kc_out,
  input  logic [LFSR_W-1:0] lfsr_out,
  input  logic [LEN-1:0]    d_func,
  output logic [LEN-1:0]    q,
  output logic              so
);

  logic [LEN-1:0] scan_in;

  always_comb begin
    scan_in[0] = si;
    for (int i = 1; i < LEN; i++)
      scan_in[i] = kc_out ? lfsr_out[(i-1) % LFSR_W] : q[i-1];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)        q <= '0;
    else if (scan_en) q <= scan_in;
    else              q <= d_func;
  end

  assign so = q[LEN-1];

endmodule
