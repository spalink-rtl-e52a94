// mgt_serializer: the multi-gigabit transceiver used in its custom mode as a
// plain WIDTH-bit parallel-in, serial-out shift register.
//
// The transceiver's parallel side is written by the CLKFM/2 logic; its
// serial side runs at WIDTH times that rate (10 * CLKFM for 20 bits). Here
// the serial side is a modulo-WIDTH counter and a shift register, both on
// clk_ser: when the counter is at 0 the shift register takes txdata,
// otherwise it shifts right, and txserial is its bit 0. Each word therefore
// leaves LSB first, one bit per clk_ser cycle, and a new word is taken every
// WIDTH clk_ser cycles. txdata must be held steady for WIDTH clk_ser cycles,
// which the frame register of the frequency shifter does (it changes once per
// CLKFM/2 period), and clk_ser must be derived from the same reference so
// that the load instant keeps a fixed phase.
//
// This is a functional stand-in for the hard transceiver: the 20-bit width
// and the shift-register role are from the document; the LSB-first order,
// the load counter and the absence of encoding, PLL and analog driver are
// this design's choices. rst is synchronous to clk_ser and active high.
module mgt_serializer #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clk_ser,
  input  logic             rst,
  input  logic [WIDTH-1:0] txdata,
  output logic             txserial
);

  localparam int unsigned CW = $clog2(WIDTH);

  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] shreg;

  always_ff @(posedge clk_ser) begin
    if (rst) begin
      cnt   <= '0;
      shreg <= '0;
    end else begin
      cnt   <= (cnt == CW'(WIDTH - 1)) ? '0 : cnt + CW'(1);
      shreg <= (cnt == '0) ? txdata : (shreg >> 1);
    end
  end

  assign txserial = shreg[0];

endmodule
