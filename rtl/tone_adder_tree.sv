// tone_adder_tree: pipelined sum of NUM_INPUTS signed tones, reduced back to
// the modulator input width.
//
// The inputs are added pairwise in a binary tree; every level gains one bit
// (four 10-bit tones give 11-bit, then 12-bit sums) and ends in a register,
// so the adders never chain within one clock period. The final sum is divided
// by NUM_INPUTS with an arithmetic right shift, which keeps its top WIDTH
// bits: the sum of NUM_INPUTS full-scale tones then just fits the modulator's
// input range. The tree shape, the width growth and the register after each
// adder follow the block diagram; the shift used for the width reduction is
// this design's reading of it.
//
// Interface: in_data packs the tones, in_data[i] being tone i.
// Timing: latency of $clog2(NUM_INPUTS) clocks, one result per clock.
// NUM_INPUTS must be a power of two. Synchronous active-high reset.
module tone_adder_tree #(
  parameter int unsigned NUM_INPUTS = 4,
  parameter int unsigned WIDTH      = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] in_data [NUM_INPUTS],
  output logic signed [WIDTH-1:0] out_data
);

  localparam int unsigned LEVELS = $clog2(NUM_INPUTS);
  localparam int unsigned SUM_W  = WIDTH + LEVELS;

  initial begin
    assert (NUM_INPUTS >= 2 && (1 << LEVELS) == NUM_INPUTS)
      else $error("tone_adder_tree: NUM_INPUTS must be a power of two >= 2");
  end

  // Heap-ordered tree: node k (1 <= k < NUM_INPUTS) registers the sum of
  // its children 2k and 2k+1; child indices >= NUM_INPUTS are the inputs.
  logic signed [SUM_W-1:0] node [1:NUM_INPUTS-1];

  for (genvar k = 1; k < NUM_INPUTS; k++) begin : g_node
    logic signed [SUM_W-1:0] left, right;
    if (2 * k >= NUM_INPUTS) begin : g_leaf
      assign left  = SUM_W'(in_data[2*k   - NUM_INPUTS]);
      assign right = SUM_W'(in_data[2*k+1 - NUM_INPUTS]);
    end else begin : g_inner
      assign left  = node[2*k];
      assign right = node[2*k+1];
    end
    always_ff @(posedge clk) begin
      if (rst) node[k] <= '0;
      else     node[k] <= left + right;
    end
  end

  assign out_data = WIDTH'(node[1] >>> LEVELS);

endmodule
