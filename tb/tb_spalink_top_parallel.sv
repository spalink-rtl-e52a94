// tb_spalink_top_parallel: end-to-end run of the parallel link without
// clock feedback, single-ended pins, first-order 10-bit modulator.
module tb_spalink_top_parallel;
  spalink_top_bench #(.DEFAULTS(1'b0), .MGT(1'b0), .FS(10), .FB(1'b0), .LVDS(1'b0),
                      .ORDER(1), .N(10)) u_bench ();
  initial begin
    wait (u_bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule
