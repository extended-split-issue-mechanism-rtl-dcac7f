// End-to-end test of the core at its default configuration: four threads,
// two units of each class (the ISA's own layout), 64 KB program and data
// memories.  See tb_smt_run for what is run and checked.
module tb_smt_vliw_top;
  tb_smt_run u_run ();
endmodule
