// Signature generator: one up-counter per signature bit position.
//
// The packet payload is viewed as a sequence of SIG_W-bit units (bytes).
// Counter i counts how many units have a 1 in bit position i. Signature bit i
// is 1 when counter i holds more than half the number of units seen, i.e.
// when 1s are the majority in that bit position; XORing every unit with the
// signature then leaves at most half of each position set. With four nibbles
// the threshold is "greater than 2", with the 68 bytes of a data packet it is
// "greater than 34". The counter-and-compare structure follows the signature
// coding scheme; accepting a 32-bit word (four units) per cycle is this
// design's choice, so a 68-byte packet takes 17 cycles.
//
// Interface: clear zeroes all counters; add_en accumulates word (all
// WORD_W/SIG_W units). sig, cnt and units are registered-state outputs,
// valid the cycle after the last add.
module signature_gen #(
  parameter int unsigned SIG_W     = 8,
  parameter int unsigned WORD_W    = 32,
  parameter int unsigned MAX_UNITS = 68,
  localparam int unsigned CNT_W    = $clog2(MAX_UNITS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   add_en,
  input  logic [WORD_W-1:0]      word,
  output logic [SIG_W-1:0]       sig,
  output logic [SIG_W-1:0][CNT_W-1:0] cnt,
  output logic [CNT_W-1:0]       units
);

  localparam int unsigned UPW = WORD_W / SIG_W;  // units per word

  logic [SIG_W-1:0][CNT_W-1:0] inc;

  always_comb begin
    for (int i = 0; i < SIG_W; i++) begin
      inc[i] = '0;
      for (int j = 0; j < UPW; j++)
        inc[i] = inc[i] + CNT_W'(word[j*SIG_W + i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      units <= '0;
    end else if (clear) begin
      cnt   <= '0;
      units <= '0;
    end else if (add_en) begin
      for (int i = 0; i < SIG_W; i++) cnt[i] <= cnt[i] + inc[i];
      units <= units + CNT_W'(UPW);
    end
  end

  // majority compare: cnt > units/2, written without a division
  always_comb begin
    for (int i = 0; i < SIG_W; i++)
      sig[i] = ({1'b0, cnt[i], 1'b0} > {2'b00, units});
  end

endmodule
