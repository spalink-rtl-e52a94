// frequency_shifter: moves the baseband bitstream up to the RF carrier by
// digital mixing.
//
// Each modulator bit (1 = +1, 0 = -1) is repeated BITS_PER_SAMPLE =
// WORD_BITS / SAMPLES_PER_WORD times and multiplied by a square carrier that
// alternates +1, -1 on successive output bits. In bit terms the product is
// an XOR: output bit j of the stream is  sample XOR (j mod 2), so a 1 becomes
// 1010... and a 0 becomes 0101.... The carrier thus runs at half the output
// bit rate: with the transceiver's 20 bits per CLKFM/2 word (10 output bits
// per modulator bit) the carrier is 5 * CLKFM, e.g. 750 MHz for a 150 MHz
// CLKFM, and the baseband tones appear as sidebands around it. A carrier
// phase register carries the alternation across word boundaries, so odd
// word widths of the parallel link keep a continuous carrier.
//
// Interface: samples[PIPES-1 -: SAMPLES_PER_WORD] is the group to send, the
// oldest bit, samples[PIPES-1], first. word[0] is the first bit to go out.
// Mixing with a square carrier at half the bit rate and the word widths are
// from the document; the bit order and carrier start phase are this design's
// choices.
//
// Timing: word and word_valid are registered, one clock after sample_valid.
// Synchronous active-high reset; the carrier restarts at +1.
module frequency_shifter #(
  parameter int unsigned PIPES            = 2,
  parameter int unsigned SAMPLES_PER_WORD = 2,
  parameter int unsigned WORD_BITS        = 20
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [PIPES-1:0]     samples,
  input  logic                 sample_valid,
  output logic [WORD_BITS-1:0] word,
  output logic                 word_valid
);

  localparam int unsigned BITS_PER_SAMPLE = WORD_BITS / SAMPLES_PER_WORD;

  initial begin
    assert (SAMPLES_PER_WORD >= 1 && SAMPLES_PER_WORD <= PIPES &&
            BITS_PER_SAMPLE * SAMPLES_PER_WORD == WORD_BITS)
      else $error("frequency_shifter: WORD_BITS must be a multiple of SAMPLES_PER_WORD <= PIPES");
  end

  logic                 carrier_phase;   // carrier sign of word[0]: 0 = +1
  logic [WORD_BITS-1:0] mixed;

  always_comb begin
    for (int j = 0; j < WORD_BITS; j++) begin
      mixed[j] = samples[PIPES-1 - (j / BITS_PER_SAMPLE)] ^ carrier_phase ^ j[0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      carrier_phase <= 1'b0;
      word          <= '0;
      word_valid    <= 1'b0;
    end else begin
      word_valid <= sample_valid;
      if (sample_valid) begin
        word          <= mixed;
        carrier_phase <= carrier_phase ^ WORD_BITS[0];
      end
    end
  end

endmodule
