// frequency_adaptor: hands the modulator bitstream (one bit per CLKFM cycle)
// to the frequency shifter at the word rate of the serializer.
//
// A chain of PIPES flip-flops shifts the modulator bit in every clock;
// pipes[0] is the newest bit and pipes[PIPES-1] the oldest. The chain is as
// long as the number of flip-flops needed to line the modulator output up
// with the serializer (2 in both reported links). A counter raises
// word_valid once every SAMPLES_PER_WORD clocks, when the oldest
// SAMPLES_PER_WORD bits of the chain are a new group that has not been
// handed on yet (the first groups after reset carry the reset zeros). For the transceiver link, whose word clock is CLKFM/2,
// SAMPLES_PER_WORD = 2: the two flip-flops hold the two bits of one word.
// For the parallel link, clocked at CLKFM, SAMPLES_PER_WORD = 1 and the
// chain is a plain 2-stage delay. The flip-flop chain and its length follow
// the document; the word counter is this design's way of expressing the
// CLKFM/2 word clock as a clock enable.
//
// Timing: a bit entering at cycle n sits in pipes[k] during cycle n+1+k.
// word_valid is registered. Synchronous active-high reset.
module frequency_adaptor #(
  parameter int unsigned PIPES            = 2,
  parameter int unsigned SAMPLES_PER_WORD = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             din,
  output logic [PIPES-1:0] pipes,
  output logic             word_valid
);

  localparam int unsigned CW = (SAMPLES_PER_WORD > 1) ? $clog2(SAMPLES_PER_WORD) : 1;

  initial begin
    assert (SAMPLES_PER_WORD >= 1 && SAMPLES_PER_WORD <= PIPES)
      else $error("frequency_adaptor: need 1 <= SAMPLES_PER_WORD <= PIPES");
  end

  logic [CW-1:0]    cnt;
  logic [PIPES:0]   chain;      // chain[0] = din, chain[k+1] = pipes[k]

  assign chain[0] = din;

  for (genvar k = 0; k < PIPES; k++) begin : g_ff
    always_ff @(posedge clk) begin
      if (rst) chain[k+1] <= 1'b0;
      else     chain[k+1] <= chain[k];
    end
  end

  assign pipes = chain[PIPES:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      word_valid <= 1'b0;
    end else begin
      cnt        <= (cnt == CW'(SAMPLES_PER_WORD - 1)) ? '0 : cnt + CW'(1);
      word_valid <= (cnt == CW'(SAMPLES_PER_WORD - 1));
    end
  end

endmodule
