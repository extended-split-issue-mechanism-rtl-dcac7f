// End-to-end test of the decoupled "-M" configuration: one multiplier serving
// both ISA multipliers (it is multiplexed to both register files), otherwise
// the default core.  The same programs must give the same results; EPs with
// two multiplies are split over two cycles.  See tb_smt_run.
module tb_smt_vliw_minus_m;
  tb_smt_run #(.NT(4), .NL(2), .NS(2), .NM(1), .ND(2),
               .USE_DEFAULTS(1'b0), .EXPECT_MOVED(1'b1)) u_run ();
  // Outer watchdog, should the run's own one never fire (100,000 clock periods).
  initial begin
    #1ms;
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end
endmodule
