// parallel_io: output stage of the parallel link ("IO interface
// configuration"): a WIDTH-bit word per clock, single-ended or as
// differential pairs, sent to the external serializer of the class-S
// amplifier together with the link clock.
//
// The word is captured in an output register on clk. With OUTPUT_LVDS = 1
// every bit leaves as a pair, out_p carrying the bit and out_n its
// complement (what a differential output buffer drives); with OUTPUT_LVDS =
// 0 only out_p is used and out_n stays low. clk is CLKFM, or, when the link
// uses external clock feedback, the CLKFM_EXT clock that the clock manager
// has aligned to the clock fed back from the board.
//
// The link clock goes out beside the data (clk_out_p/clk_out_n), the way an
// FPGA forwards a clock: a double-data-rate output whose rising-edge
// register holds 1 and whose falling-edge register holds 0, so the pin
// copies clk while the link runs and stays low in reset. Its rising edge
// coincides with the edge that updates the data, so the receiver captures
// on the falling edge or with its own delay. The choice of pad standard
// (e.g. LVDS at 2.5 V) is a pin constraint, not logic, and is not
// represented here. The single-ended/differential choice and the forwarded
// clock pin follow the document; the register stage, the pin encoding and
// the DDR clock-forwarding circuit are this design's own.
//
// Timing: outputs change one clock after data_in. Synchronous active-high
// reset drives all data pins to 0 (out_n to 1 in differential mode); the
// forwarded clock starts on the first rising edge after reset.
module parallel_io #(
  parameter int unsigned WIDTH       = 10,
  parameter bit          OUTPUT_LVDS = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] out_p,
  output logic [WIDTH-1:0] out_n,
  output logic             clk_out_p,
  output logic             clk_out_n
);

  logic fwd_rise, fwd_fall;   // DDR halves of the forwarded clock

  always_ff @(posedge clk) begin
    if (rst) fwd_rise <= 1'b0;
    else     fwd_rise <= 1'b1;
  end

  always_ff @(negedge clk) begin
    fwd_fall <= 1'b0;
  end

  assign clk_out_p = clk ? fwd_rise : fwd_fall;
  assign clk_out_n = OUTPUT_LVDS ? ~clk_out_p : 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_p <= '0;
      out_n <= OUTPUT_LVDS ? '1 : '0;
    end else begin
      out_p <= data_in;
      out_n <= OUTPUT_LVDS ? ~data_in : '0;
    end
  end

endmodule
