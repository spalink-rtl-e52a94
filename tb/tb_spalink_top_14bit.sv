// tb_spalink_top_14bit: end-to-end run of the measured prototype setting:
// transceiver link, first-order modulator, 14-bit tones and modulator input,
// CLKFM = 150 MHz, carrier 750 MHz.
module tb_spalink_top_14bit;
  spalink_top_bench #(.DEFAULTS(1'b0), .MGT(1'b1), .FS(20), .ORDER(1), .N(14)) u_bench ();
  initial begin
    wait (u_bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule
