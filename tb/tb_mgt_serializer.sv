// tb_mgt_serializer: loads random 20-bit words and checks that each word
// leaves LSB first, one bit per serial clock, back to back with no gap.
// The word source changes its word 10 serial clocks after each load, the way
// the CLKFM/2 logic does, and the test checks the first serial bit of each
// word appears one clock after the load.
module tb_mgt_serializer;
  localparam int W = 20;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] txdata;
  logic txserial;
  int checks = 0, failures = 0;

  mgt_serializer #(.WIDTH(W)) dut (.clk_ser(clk), .rst, .txdata, .txserial);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word source: a new word 10 serial clocks after each load
  initial begin
    txdata = W'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    forever begin
      repeat (10) @(posedge clk);
      #1 txdata = W'($urandom);
      repeat (10) @(posedge clk);
    end
  end

  // independent observer: collect serial bits and words loaded
  logic [W-1:0] loaded [$];
  int cyc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (cyc % W == 0) loaded.push_back(txdata);
      cyc <= cyc + 1;
    end
  end
  always @(negedge clk) begin
    if (!rst && cyc > 0) begin
      // bit (cyc-1) % W of word (cyc-1) / W
      int k;
      k = (cyc - 1) / W;
      if (k < loaded.size()) begin
        checks++;
        if (txserial != loaded[k][(cyc - 1) % W]) begin
          failures++;
          if (failures < 10) $display("cyc %0d bit mismatch", cyc);
        end
      end
      if (cyc == 2000 * W) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
