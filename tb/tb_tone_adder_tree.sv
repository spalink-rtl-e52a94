// tb_tone_adder_tree: drives four random 10-bit tones, including all-max and
// all-min extremes, and checks that the output equals the sum divided by 4
// (floor, as an arithmetic shift) exactly two clocks later.
module tb_tone_adder_tree;
  localparam int unsigned N = 4, W = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] din [N];
  logic signed [W-1:0] dout;
  int checks = 0, failures = 0;
  int hist [$];

  tone_adder_tree #(.NUM_INPUTS(N), .WIDTH(W)) dut (.clk, .rst, .in_data(din), .out_data(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_div4(int s);
    return (s >= 0) ? s / 4 : -((-s + 3) / 4);
  endfunction

  initial begin
    int s, e;
    foreach (din[i]) din[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      s = 0;
      foreach (din[i]) begin
        if (t % 100 == 7)       din[i] = 10'sd511;
        else if (t % 100 == 8)  din[i] = -10'sd512;
        else                    din[i] = W'($urandom);
        s += int'(din[i]);
      end
      hist.push_back(floor_div4(s));
      @(posedge clk); #1;
      if (t >= 1) begin
        // result for inputs applied at t-1 appears after the second edge
        e = hist.pop_front();
        checks++;
        if (int'(dout) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d exp %0d", t, dout, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
