// tb_frequency_shifter: checks the digital mixing for the transceiver word
// (2 samples x 10 bits = 20 bits) and for an odd-width parallel word (1
// sample x 9 bits), where the carrier must stay continuous across words.
// A reference keeps a running output-bit index n over all words sent and
// expects bit n = sample XOR (n mod 2), the oldest sample first. It also
// checks the one-clock latency of word_valid and that words are held while
// sample_valid is low.
module tb_frequency_shifter;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] smp;
  logic       sv;
  logic [19:0] wa;
  logic [8:0]  wb;
  logic va, vb;
  int checks = 0, failures = 0;
  longint na = 0, nb = 0;

  frequency_shifter #(.PIPES(2), .SAMPLES_PER_WORD(2), .WORD_BITS(20)) dut_a
    (.clk, .rst, .samples(smp), .sample_valid(sv), .word(wa), .word_valid(va));
  frequency_shifter #(.PIPES(2), .SAMPLES_PER_WORD(1), .WORD_BITS(9)) dut_b
    (.clk, .rst, .samples(smp), .sample_valid(sv), .word(wb), .word_valid(vb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] ea, hold_a;
    logic [8:0]  eb, hold_b;
    smp = '0; sv = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    hold_a = '0; hold_b = '0;
    for (int t = 0; t < 5000; t++) begin
      smp = 2'($urandom);
      sv  = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < 20; j++) ea[j] = smp[1 - j / 10] ^ 1'((na + j) % 2);
      for (int j = 0; j < 9; j++)  eb[j] = smp[1] ^ 1'((nb + j) % 2);
      @(posedge clk); #1;
      checks += 4;
      if (va != sv || vb != sv) failures++;
      if (sv) begin
        if (wa != ea) failures++;
        if (wb != eb) begin
          failures++;
          if (failures < 10) $display("t=%0d wb=%b exp %b", t, wb, eb);
        end
        na += 20; nb += 9;
        hold_a = ea; hold_b = eb;
      end else begin
        if (wa != hold_a) failures++;
        if (wb != hold_b) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
