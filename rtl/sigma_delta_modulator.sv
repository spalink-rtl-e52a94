// sigma_delta_modulator: lowpass 1-bit sigma-delta modulator, first or second
// order, converting a WIDTH-bit two's-complement signal into a bitstream at
// the same clock rate.
//
// It is written in error-feedback form. With full scale FS = 2**(WIDTH-1),
// the quantiser input is
//   ORDER 1: w[n] = x[n] - q[n-1]
//   ORDER 2: w[n] = x[n] - 2*q[n-1] + q[n-2]
// the output bit is y[n] = (w[n] >= 0), worth +FS when 1 and -FS when 0, and
// the quantisation error is q[n] = (y ? +FS : -FS) - w[n]. The output is
// therefore x filtered by nothing but a delay, plus the error shaped by
// (1 - z^-1)**ORDER, which pushes the noise away from the low-frequency band
// where the tones are. The first-order form is the same as a plain
// accumulate-and-compare loop. For ORDER 2 the quantiser input is clamped to
// [-4*FS, 4*FS-1] so that the loop stays bounded when the input peaks near
// full scale; `overload` is high in the cycle after a clamp took effect.
//
// The order (1st and 2nd were built), the 1-bit output and the input width
// follow the reported configurations; the error-feedback structure, the
// clamp and the bit polarity (1 = +FS) are this design's own choices.
//
// Timing: dout and overload are registered; dout at cycle n+1 belongs to din
// sampled at cycle n. Synchronous active-high reset clears the loop state.
module sigma_delta_modulator #(
  parameter int unsigned ORDER = 1,
  parameter int unsigned WIDTH = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] din,
  output logic                    dout,
  output logic                    overload
);

  localparam int unsigned W = WIDTH + 5;          // internal width
  localparam logic signed [W-1:0] FS      = W'(1) <<< (WIDTH - 1);
  localparam logic signed [W-1:0] CLAMP_H = (FS <<< 2) - W'(1);
  localparam logic signed [W-1:0] CLAMP_L = -(FS <<< 2);

  initial begin
    assert (ORDER == 1 || ORDER == 2)
      else $error("sigma_delta_modulator: ORDER must be 1 or 2");
  end

  logic signed [W-1:0] q1, q2;          // q[n-1], q[n-2]
  logic signed [W-1:0] w_raw, w, q;
  logic                y, clamped;

  always_comb begin
    if (ORDER == 1) w_raw = W'(din) - q1;
    else            w_raw = W'(din) - (q1 <<< 1) + q2;
    clamped = 1'b0;
    w       = w_raw;
    if (ORDER != 1) begin
      if (w_raw > CLAMP_H) begin
        w = CLAMP_H;
        clamped = 1'b1;
      end else if (w_raw < CLAMP_L) begin
        w = CLAMP_L;
        clamped = 1'b1;
      end
    end
    y = ~w[W-1];
    q = (y ? FS : -FS) - w;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q1       <= '0;
      q2       <= '0;
      dout     <= 1'b0;
      overload <= 1'b0;
    end else begin
      q1       <= q;
      q2       <= q1;
      dout     <= y;
      overload <= clamped;
    end
  end

endmodule
