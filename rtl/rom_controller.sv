// rom_controller: golden-key ROM and the controller that reads it out.
//
// The golden key is stored in a ROM of KEY_W/ROM_WORD_W words of ROM_WORD_W
// bits, word 0 holding the least significant bits. After reset the controller
// reads one word per clk cycle into the key register, from word 0 upwards,
// and raises key_valid once the last word is in, KEY_W/ROM_WORD_W cycles after
// reset is released. key then holds the golden key until the next reset.
//
// Storing the golden key in a synthesizable ROM that feeds the comparator
// follows the reference design; the word width, the word-serial readout and
// key_valid are choices of this implementation. KEY_W must be a multiple of
// ROM_WORD_W.
module rom_controller #(
  parameter int          KEY_W      = secure_scan_pkg::DEFAULT_KEY_W,
  parameter int          WORD_W     = secure_scan_pkg::ROM_WORD_W,
  parameter logic [63:0] GOLDEN_KEY = secure_scan_pkg::DEFAULT_GOLDEN_KEY
) (
  input  logic             clk,
  input  logic             reset,
  output logic [KEY_W-1:0] key,
  output logic             key_valid
);

  localparam int DEPTH = KEY_W / WORD_W;
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WORD_W-1:0] rom [DEPTH];
  logic [AW-1:0]     addr;
  logic              loading;

  // ROM contents: word w is bits [w*WORD_W +: WORD_W] of GOLDEN_KEY.
  always_comb begin
    for (int w = 0; w < DEPTH; w++) rom[w] = GOLDEN_KEY[w*WORD_W +: WORD_W];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      key       <= '0;
      addr      <= '0;
      loading   <= 1'b1;
      key_valid <= 1'b0;
    end else if (loading) begin
      key[addr*WORD_W +: WORD_W] <= rom[addr];
      if (addr == AW'(DEPTH - 1)) begin
        loading   <= 1'b0;
        key_valid <= 1'b1;
      end else begin
        addr <= addr + 1'b1;
      end
    end
  end

endmodule
