// dds: direct digital synthesizer producing one sine tone.
//
// An ACC_WIDTH-bit phase accumulator adds freq_word every clock. Its top
// PHASE_WIDTH bits (the phase angle) select one of 2**PHASE_WIDTH points of
// a sine period with amplitude A = 2**(OUT_WIDTH-1)-1:
//   sine(p) = round(A * sin(2*pi*p / 2**PHASE_WIDTH))   (round half away from 0)
// Only the first quarter period is stored: a table of 2**(PHASE_WIDTH-2)
// words Q[a] = sine(a), computed at elaboration. The two top phase bits pick
// the quadrant: quadrant 0 reads Q[a], quadrant 1 reads Q[QN-a] (with the
// peak A for a = 0), quadrants 2 and 3 negate the same values. This gives
// exactly the full-period values from a quarter of the memory: 512 x 10 bits
// for the default widths, small enough for one block RAM per tone.
//
// Widths follow the reported configuration (33-bit frequency word and
// accumulator, 11-bit phase angle, 10-bit output). The accumulator/table
// organisation, the quarter-wave folding, the rounding and the latency are
// this design's own choices, standing in for a vendor-generated core.
//
// Timing: sine is registered; after reset, sine at cycle n+1 is the value
// for the accumulator held at cycle n (the accumulator starts at 0).
// Accumulator and output clear on a synchronous active-high reset.
module dds #(
  parameter int unsigned ACC_WIDTH   = 33,
  parameter int unsigned PHASE_WIDTH = 11,
  parameter int unsigned OUT_WIDTH   = 10
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [ACC_WIDTH-1:0]        freq_word,
  output logic signed [OUT_WIDTH-1:0] sine
);

  typedef logic signed [OUT_WIDTH-1:0] sample_t;
  localparam int unsigned QBITS = PHASE_WIDTH - 2;
  localparam int unsigned QN    = 2 ** QBITS;        // quarter-period points
  localparam sample_t     AMP   = sample_t'((2 ** (OUT_WIDTH - 1)) - 1);

  function automatic sample_t [QN-1:0] make_quarter_table();
    sample_t [QN-1:0] t;
    real v;
    for (int i = 0; i < QN; i++) begin
      v = real'(AMP) * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(4 * QN));
      t[i] = sample_t'($rtoi(v + 0.5));               // v >= 0 here
    end
    return t;
  endfunction

  localparam sample_t [QN-1:0] QUARTER_ROM = make_quarter_table();

  logic [ACC_WIDTH-1:0]   acc;
  logic [PHASE_WIDTH-1:0] phase;
  logic [1:0]             quadrant;
  logic [QBITS-1:0]       addr, raddr;
  logic                   at_peak;
  sample_t                mag, value;

  assign phase    = acc[ACC_WIDTH-1 -: PHASE_WIDTH];
  assign quadrant = phase[PHASE_WIDTH-1 -: 2];
  assign addr     = phase[QBITS-1:0];

  always_comb begin
    // falling quadrants mirror the address; their a = 0 point is the peak
    at_peak = quadrant[0] && (addr == '0);
    raddr   = quadrant[0] ? QBITS'(QN - int'(addr)) : addr;
    mag     = at_peak ? AMP : QUARTER_ROM[raddr];
    value   = quadrant[1] ? -mag : mag;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      sine <= '0;
    end else begin
      acc  <= acc + freq_word;
      sine <= value;
    end
  end

endmodule
