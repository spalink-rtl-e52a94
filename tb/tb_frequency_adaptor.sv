// tb_frequency_adaptor: feeds random bits into two adaptors, the transceiver
// form (2 flip-flops, a word every 2 clocks) and the parallel form (2
// flip-flops, a word every clock). Checks every clock that pipes[k] holds the
// bit that entered k+1 clocks earlier, that word_valid has the right period,
// and that consecutive words hand on each bit exactly once.
module tb_frequency_adaptor;
  logic clk = 1'b0, rst = 1'b1;
  logic din;
  logic [1:0] pa, pb;
  logic va, vb;
  int checks = 0, failures = 0;
  bit hist [$];
  int words_a = 0, words_b = 0;

  frequency_adaptor #(.PIPES(2), .SAMPLES_PER_WORD(2)) dut_a (.clk, .rst, .din, .pipes(pa), .word_valid(va));
  frequency_adaptor #(.PIPES(2), .SAMPLES_PER_WORD(1)) dut_b (.clk, .rst, .din, .pipes(pb), .word_valid(vb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_a, last_b;
    din = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    last_a = -1; last_b = -1;
    for (int t = 0; t < 4000; t++) begin
      din = 1'($urandom);
      hist.push_front(din);          // hist[0] = newest
      @(posedge clk); #1;
      if (t >= 2) begin
        checks += 2;
        if (pa != {hist[1], hist[0]} || pb != {hist[1], hist[0]}) failures++;
      end
      // transceiver form: a word on every second clock, never two in a row
      checks++;
      if (va) begin
        words_a++;
        if (last_a >= 0 && t - last_a != 2) failures++;
        last_a = t;
      end else if (last_a >= 0 && t - last_a != 1) failures++;
      else if (last_a < 0 && t > 2) failures++;
      checks++;
      if (vb) begin
        words_b++;
        if (last_b >= 0 && t - last_b != 1) failures++;
        last_b = t;
      end else if (t > 1) failures++;
    end
    checks += 2;
    if (words_a < 1990 || words_a > 2000) begin failures++; $display("words_a=%0d", words_a); end
    if (words_b < 3990) begin failures++; $display("words_b=%0d", words_b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
