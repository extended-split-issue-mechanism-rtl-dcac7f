// End-to-end test of the decoupled "-M+L" configuration: one multiplier
// serving both ISA multipliers and a third ALU, otherwise the default core.
// The same programs must give the same results, with operations moved to the
// shared multiplier and the extra ALU.  See tb_smt_run.
module tb_smt_vliw_ml;
  tb_smt_run #(.NT(4), .NL(3), .NS(2), .NM(1), .ND(2),
               .USE_DEFAULTS(1'b0), .EXPECT_MOVED(1'b1)) u_run ();
  // Outer watchdog, should the run's own one never fire (100,000 clock periods).
  initial begin
    #1ms;
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
