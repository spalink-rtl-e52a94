// tb_spalink_top_parallel_fb: end-to-end run of the parallel link with
// external clock feedback and a second-order 10-bit modulator: 10-bit words
// per CLKFM cycle on differential pins, output register on the feedback
// clock (the low-cost FPGA configuration).
module tb_spalink_top_parallel_fb;
  spalink_top_bench #(.DEFAULTS(1'b0), .MGT(1'b0), .FS(10), .FB(1'b1), .LVDS(1'b1),
                      .ORDER(2), .N(10)) u_bench ();
  initial begin
    wait (u_bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule
