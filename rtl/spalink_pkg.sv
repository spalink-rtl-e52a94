// spalink_pkg: elaboration-time helpers shared by the class-S bitstream
// transmitter. dds_tuning_word() turns a tone frequency into the phase
// increment of an ACC_WIDTH-bit accumulator clocked at clk_hz, rounded to the
// nearest integer:
//   word = round(freq_hz * 2**ACC_WIDTH / clk_hz).
// With a 33-bit accumulator at 150 MHz a 1 MHz tone needs word 57266231.
// The accumulator width comes from the document; computing the word at
// elaboration, with round-to-nearest, is this design's choice.
package spalink_pkg;

  // Largest accumulator the tuning-word helper supports (64-bit arithmetic).
  localparam int unsigned MAX_ACC_WIDTH = 48;

  typedef logic [MAX_ACC_WIDTH-1:0] tuning_word_t;

  function automatic tuning_word_t dds_tuning_word(longint unsigned freq_hz,
                                                   longint unsigned clk_hz,
                                                   int unsigned     acc_width);
    longint unsigned num;
    num = (freq_hz << acc_width) + (clk_hz >> 1);
    return tuning_word_t'(num / clk_hz);
  endfunction

endpackage
