// tb_dds: self-checking test of the dds block at its default widths (33-bit
// accumulator, 11-bit phase, 10-bit output). A reference accumulator and a
// sine computed with $sin predict every output sample; the tuning word is
// changed mid-run. Also checks the one-clock output latency after reset
// (first sample 0, second sample sin of phase 0 = 0, third sin of the word)
// and that the amplitude of a slow tone reaches +-(2**9-1). The last tuning
// word steps one phase point per clock, so all 2048 points of the period,
// in all four quadrants, are compared with the full-period reference.
module tb_dds;
  localparam int unsigned AW = 33, PW = 11, OW = 10;
  logic clk = 1'b0, rst = 1'b1;
  logic [AW-1:0] fw;
  logic signed [OW-1:0] sine;
  int checks = 0, failures = 0;
  longint unsigned acc_m;
  int max_seen, min_seen;

  dds #(.ACC_WIDTH(AW), .PHASE_WIDTH(PW), .OUT_WIDTH(OW)) dut (.clk, .rst, .freq_word(fw), .sine);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sine(longint unsigned acc);
    longint unsigned ph;
    real v;
    ph = (acc >> (AW - PW)) & ((64'd1 << PW) - 1);
    v  = 511.0 * $sin(2.0 * 3.14159265358979323846 * real'(ph) / 2048.0);
    return $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
  endfunction

  task automatic run(int n);
    int exp_v;
    for (int i = 0; i < n; i++) begin
      exp_v = ref_sine(acc_m);
      acc_m = (acc_m + fw) & ((64'd1 << AW) - 1);
      @(posedge clk); #1;
      checks++;
      if (int'(sine) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch: got %0d exp %0d", sine, exp_v);
      end
      if (int'(sine) > max_seen) max_seen = int'(sine);
      if (int'(sine) < min_seen) min_seen = int'(sine);
    end
  endtask

  initial begin
    max_seen = 0; min_seen = 0;
    fw = 33'd57266231;              // 1 MHz at 150 MHz
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    acc_m = 0;
    checks++; if (sine != 0) failures++;   // still reset value
    run(20000);
    // both extremes of a full-scale sine
    checks++; if (max_seen != 511 || min_seen != -511) begin
      failures++; $display("amplitude %0d..%0d", min_seen, max_seen);
    end
    fw = 33'h1_2345_6789;           // large, odd step
    run(3000);
    fw = 33'd4194304;               // exactly one table step per clock
    run(4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
