// tb_spalink_top_mgt_order2: end-to-end run of the transceiver link with a
// second-order 10-bit modulator.
module tb_spalink_top_mgt_order2;
  spalink_top_bench #(.DEFAULTS(1'b0), .MGT(1'b1), .FS(20), .ORDER(2), .N(10)) u_bench ();
  initial begin
    wait (u_bench.done);
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures);
    $finish;
  end
endmodule
