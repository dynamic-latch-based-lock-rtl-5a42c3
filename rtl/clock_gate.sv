// clock_gate: glitch-free clock gate that enables the scan-side clock only
// after key entry is complete.
//
// gated_clk = clk AND en, where en (key_ready) is sampled by a latch that is
// open while clk is low. A change of en therefore only takes effect at the
// next rising edge of clk and can never cut a high phase short. Before
// key_ready is raised gated_clk stays low, so the LFSR and scan flip-flops
// behind it do not toggle. reset closes the gate asynchronously.
//
// Gating the clock with key_ready follows the reference design; the
// enable latch (a standard integrated clock gate) is this implementation's
// choice to keep the gated clock free of glitches. The latch is intended:
// it is the clock-gating cell.
module clock_gate (
  input  logic clk,
  input  logic reset,
  input  logic en,
  output logic gated_clk
);

  logic en_latched;

  always_latch begin
    if (reset)     en_latched = 1'b0;
    else if (!clk) en_latched = en;
  end

  assign gated_clk = clk & en_latched;

endmodule
