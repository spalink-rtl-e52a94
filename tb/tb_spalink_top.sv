// tb_spalink_top: end-to-end run of spalink_top at its default parameters
// (transceiver link, 20-bit words, first-order 10-bit modulator, four tones
// at 1.0/1.2/1.4/1.6 MHz with CLKFM = 150 MHz) over 150000 modulator samples
// (1 ms of signal, a whole number of periods of every tone), the record
// length used for the modulator spectrum of the first-order build.
module tb_spalink_top;
  spalink_top_bench #(.DEFAULTS(1'b1), .NSAMP(150000)) u_bench ();
  initial begin
    wait (u_bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule
