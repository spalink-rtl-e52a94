// tb_parallel_io: checks the parallel-link output register in its
// differential form (out_n = ~out_p) and single-ended form (out_n low):
// one clock of latency, reset values, and random 10-bit words. The forwarded
// clock must be low in reset and then follow clk: high after each rising
// edge, low after each falling edge, complemented on the n pin in the
// differential form.
module tb_parallel_io;
  logic clk = 1'b0, rst = 1'b1;
  logic [9:0] d;
  logic [9:0] p1, n1, p0, n0;
  logic cp1, cn1, cp0, cn0;
  int checks = 0, failures = 0;

  parallel_io #(.WIDTH(10), .OUTPUT_LVDS(1'b1)) dut_lvds (.clk, .rst, .data_in(d), .out_p(p1), .out_n(n1),
                                                         .clk_out_p(cp1), .clk_out_n(cn1));
  parallel_io #(.WIDTH(10), .OUTPUT_LVDS(1'b0)) dut_se   (.clk, .rst, .data_in(d), .out_p(p0), .out_n(n0),
                                                         .clk_out_p(cp0), .clk_out_n(cn0));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] prev;
    d = 10'h3ff;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (p1 != '0 || n1 != '1 || p0 != '0 || n0 != '0) failures++;
    checks++;
    if (cp1 != 1'b0 || cp0 != 1'b0 || cn0 != 1'b0) failures++;
    @(negedge clk); #1;
    checks++;
    if (cp1 != 1'b0 || cp0 != 1'b0) failures++;
    @(posedge clk); #1;
    rst = 1'b0;
    prev = d;
    for (int t = 0; t < 3000; t++) begin
      d = 10'($urandom);
      checks++;   // still the previous word before the edge
      if (t > 0 && p1 != prev) failures++;
      @(posedge clk); #1;
      checks += 4;
      if (p1 != d)  failures++;
      if (n1 != ~d) failures++;
      if (p0 != d)  failures++;
      if (n0 != '0) failures++;
      checks += 2;
      if (cp1 != 1'b1 || cn1 != 1'b0 || cp0 != 1'b1 || cn0 != 1'b0) failures++;
      #5;    // falling edge of clk
      if (cp1 != 1'b0 || cn1 != 1'b1 || cp0 != 1'b0 || cn0 != 1'b0) failures++;
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
