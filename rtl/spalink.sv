// spalink: the link that carries the RF bitstream from the FPGA to the class-S
// power amplifier. One description covers three link types, picked at
// elaboration time:
//
//   VIRTEXIIPRO_MGT = 1: a multi-gigabit transceiver serializes the
//     FS_MULTIPLICATION_FACTOR-bit (fixed at 20) word written every CLKFM/2
//     period onto a single differential pair (mgt_txserial), clocked by
//     clk_ser = 10 * CLKFM.
//   VIRTEXIIPRO_MGT = 0, EXTERNAL_CLOCK_FEEDBACK = 0: parallel link; the
//     FS_MULTIPLICATION_FACTOR-bit word leaves every CLKFM cycle on
//     par_data_p/par_data_n, registered on clk_fm, with the clock forwarded
//     on par_clk_p/par_clk_n.
//   VIRTEXIIPRO_MGT = 0, EXTERNAL_CLOCK_FEEDBACK = 1: as above, but the output
//     register runs on clk_link, the link clock that the clock manager has
//     locked to the clock fed back from the board, so that board delay is
//     compensated; the forwarded clock is then CLKFM_EXT. The clock fed back
//     from the board goes to the clock manager only, which is not part of
//     this RTL. clk_link has CLKFM's frequency; the clock manager keeps
//     its phase such that clk_fm data is captured safely.
//
// Unused outputs of the link types not chosen are held low. The three link
// types, their word widths and clocks follow the document; the port
// naming and the clock-enable style are this design's own.
module spalink #(
  parameter bit          VIRTEXIIPRO_MGT          = 1'b1,
  parameter int unsigned FS_MULTIPLICATION_FACTOR = 20,
  parameter bit          OUTPUT_LVDS              = 1'b1,
  parameter bit          EXTERNAL_CLOCK_FEEDBACK  = 1'b0
) (
  input  logic                                clk_fm,
  input  logic                                rst_fm,
  input  logic                                clk_ser,
  input  logic                                rst_ser,
  input  logic                                clk_link,
  input  logic                                rst_link,
  input  logic [FS_MULTIPLICATION_FACTOR-1:0] word,
  output logic                                mgt_txserial,
  output logic [FS_MULTIPLICATION_FACTOR-1:0] par_data_p,
  output logic [FS_MULTIPLICATION_FACTOR-1:0] par_data_n,
  output logic                                par_clk_p,
  output logic                                par_clk_n
);

  if (VIRTEXIIPRO_MGT) begin : g_mgt
    initial begin
      assert (FS_MULTIPLICATION_FACTOR == 20)
        else $error("spalink: the transceiver link has a fixed 20-bit word");
    end
    mgt_serializer #(.WIDTH(FS_MULTIPLICATION_FACTOR)) u_mgt (
      .clk_ser (clk_ser),
      .rst     (rst_ser),
      .txdata  (word),
      .txserial(mgt_txserial)
    );
    assign par_data_p = '0;
    assign par_data_n = '0;
    assign par_clk_p  = 1'b0;
    assign par_clk_n  = 1'b0;
  end else begin : g_parallel
    logic clk_out, rst_out;
    if (EXTERNAL_CLOCK_FEEDBACK) begin : g_fb
      assign clk_out = clk_link;
      assign rst_out = rst_link;
    end else begin : g_nofb
      assign clk_out = clk_fm;
      assign rst_out = rst_fm;
    end
    parallel_io #(.WIDTH(FS_MULTIPLICATION_FACTOR), .OUTPUT_LVDS(OUTPUT_LVDS)) u_io (
      .clk    (clk_out),
      .rst    (rst_out),
      .data_in(word),
      .out_p  (par_data_p),
      .out_n  (par_data_n),
      .clk_out_p(par_clk_p),
      .clk_out_n(par_clk_n)
    );
    assign mgt_txserial = 1'b0;
  end

endmodule
