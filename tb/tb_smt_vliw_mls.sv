// End-to-end test of the decoupled "-M+L+S" configuration: one multiplier,
// three ALUs and three shifters.  The same programs must give the same
// results.  See tb_smt_run.
module tb_smt_vliw_mls;
  tb_smt_run #(.NT(4), .NL(3), .NS(3), .NM(1), .ND(2),
               .USE_DEFAULTS(1'b0), .EXPECT_MOVED(1'b1)) u_run ();
  // Outer watchdog, should the run's own one never fire (100,000 clock periods).
  initial begin
    #1ms;
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
