// spalink_top: complete digital front end of a class-S power amplifier that
// turns a multi-tone test signal into an RF bitstream.
//
// Chain, all in the CLKFM domain except the link's own clocks:
//   NUM_DDS dds tones -> tone_adder_tree (pipelined, /NUM_DDS) ->
//   sigma_delta_modulator (1 bit) -> frequency_adaptor (DACOUT_PIPES_V2PMGT
//   flip-flops) -> frequency_shifter (x10 digital mixing, carrier at
//   5 * CLKFM) -> spalink (transceiver serial link or parallel link).
//
// The tone frequencies are fixed at elaboration: tuning word
// round(TONE_HZ[i] * 2**DDS_ACC_WIDTH / CLKFM_HZ). Because the modulator runs
// at CLKFM and only the shifter works at RF, the feedback loop of the
// modulator never has to close at the carrier rate.
//
// Clocks: clk_fm (CLKFM), clk_ser (transceiver serial clock, 10 * CLKFM,
// edge-aligned with clk_fm), clk_link (CLKFM_EXT, used only by the parallel
// link with external clock feedback). The clock manager that makes them is
// not part of this RTL. Each rst_* is active high and synchronous to its
// clock. In transceiver mode the frame word is written every second CLKFM
// cycle, standing for the CLKFM/2 word clock.
//
// par_clk_p/par_clk_n carry the forwarded link clock of the parallel link.
// dacout (the 1-bit modulator output), sd_overload and frame_valid (a new
// link word was written) are brought out for observation. Parameter defaults are the reported transceiver configuration
// with a first-order, 10-bit modulator and the 150 MHz CLKFM of the measured
// prototype. The parallel link is chosen with VIRTEXIIPRO_MGT = 0 and
// FS_MULTIPLICATION_FACTOR = 10. The chain, its parameters and their
// defaults follow the document; the CLKFM/2 clock enable, the reset scheme
// and the observation outputs are this design's own.
module spalink_top
  import spalink_pkg::*;
#(
  parameter int unsigned     DAC_NUM_BITS             = 10,
  parameter int unsigned     FS_MULTIPLICATION_FACTOR = 20,
  parameter bit              EXTERNAL_CLOCK_FEEDBACK  = 1'b0,
  parameter bit              OUTPUT_LVDS              = 1'b1,
  parameter bit              VIRTEXIIPRO_MGT          = 1'b1,
  parameter int unsigned     DACOUT_PIPES_V2PMGT      = 2,
  parameter int unsigned     SD_ORDER                 = 1,
  parameter int unsigned     NUM_DDS                  = 4,
  parameter int unsigned     DDS_ACC_WIDTH            = 33,
  parameter int unsigned     DDS_PHASE_WIDTH          = 11,
  parameter longint unsigned CLKFM_HZ                 = 150_000_000,
  parameter longint unsigned TONE_HZ [NUM_DDS]        = '{1_000_000, 1_200_000, 1_400_000, 1_600_000}
) (
  input  logic                                clk_fm,
  input  logic                                rst,
  input  logic                                clk_ser,
  input  logic                                rst_ser,
  input  logic                                clk_link,
  input  logic                                rst_link,
  output logic                                mgt_txserial,
  output logic [FS_MULTIPLICATION_FACTOR-1:0] par_data_p,
  output logic [FS_MULTIPLICATION_FACTOR-1:0] par_data_n,
  output logic                                par_clk_p,
  output logic                                par_clk_n,
  output logic                                dacout,
  output logic                                sd_overload,
  output logic                                frame_valid
);

  // transceiver word clock is CLKFM/2: two modulator bits per word
  localparam int unsigned SAMPLES_PER_WORD = VIRTEXIIPRO_MGT ? 2 : 1;

  logic signed [DAC_NUM_BITS-1:0] tone [NUM_DDS];
  logic signed [DAC_NUM_BITS-1:0] tone_sum;
  logic [DACOUT_PIPES_V2PMGT-1:0] pipes;
  logic                           pipes_valid;
  logic [FS_MULTIPLICATION_FACTOR-1:0] word;

  for (genvar i = 0; i < NUM_DDS; i++) begin : g_dds
    localparam tuning_word_t TW = dds_tuning_word(TONE_HZ[i], CLKFM_HZ, DDS_ACC_WIDTH);
    dds #(
      .ACC_WIDTH  (DDS_ACC_WIDTH),
      .PHASE_WIDTH(DDS_PHASE_WIDTH),
      .OUT_WIDTH  (DAC_NUM_BITS)
    ) u_dds (
      .clk      (clk_fm),
      .rst      (rst),
      .freq_word(TW[DDS_ACC_WIDTH-1:0]),
      .sine     (tone[i])
    );
  end

  tone_adder_tree #(.NUM_INPUTS(NUM_DDS), .WIDTH(DAC_NUM_BITS)) u_sum (
    .clk     (clk_fm),
    .rst     (rst),
    .in_data (tone),
    .out_data(tone_sum)
  );

  sigma_delta_modulator #(.ORDER(SD_ORDER), .WIDTH(DAC_NUM_BITS)) u_sdm (
    .clk     (clk_fm),
    .rst     (rst),
    .din     (tone_sum),
    .dout    (dacout),
    .overload(sd_overload)
  );

  frequency_adaptor #(
    .PIPES           (DACOUT_PIPES_V2PMGT),
    .SAMPLES_PER_WORD(SAMPLES_PER_WORD)
  ) u_adapt (
    .clk       (clk_fm),
    .rst       (rst),
    .din       (dacout),
    .pipes     (pipes),
    .word_valid(pipes_valid)
  );

  frequency_shifter #(
    .PIPES           (DACOUT_PIPES_V2PMGT),
    .SAMPLES_PER_WORD(SAMPLES_PER_WORD),
    .WORD_BITS       (FS_MULTIPLICATION_FACTOR)
  ) u_shift (
    .clk         (clk_fm),
    .rst         (rst),
    .samples     (pipes),
    .sample_valid(pipes_valid),
    .word        (word),
    .word_valid  (frame_valid)
  );

  spalink #(
    .VIRTEXIIPRO_MGT         (VIRTEXIIPRO_MGT),
    .FS_MULTIPLICATION_FACTOR(FS_MULTIPLICATION_FACTOR),
    .OUTPUT_LVDS             (OUTPUT_LVDS),
    .EXTERNAL_CLOCK_FEEDBACK (EXTERNAL_CLOCK_FEEDBACK)
  ) u_link (
    .clk_fm      (clk_fm),
    .rst_fm      (rst),
    .clk_ser     (clk_ser),
    .rst_ser     (rst_ser),
    .clk_link    (clk_link),
    .rst_link    (rst_link),
    .word        (word),
    .mgt_txserial(mgt_txserial),
    .par_data_p  (par_data_p),
    .par_data_n  (par_data_n),
    .par_clk_p   (par_clk_p),
    .par_clk_n   (par_clk_n)
  );

endmodule
