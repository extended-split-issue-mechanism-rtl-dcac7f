// Self-checking test of one thread's register files: random multi-port
// writes (higher port wins on a clash) and the debug write, compared with a
// model array; reads are combinational and see writes after the clock edge.
module tb_regfile;
  import smt_vliw_pkg::*;
  localparam int NR = 4, NW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NR-1:0][4:0] ra; logic [NR-1:0][31:0] rd;
  logic [NW-1:0] we; logic [NW-1:0][4:0] wa; logic [NW-1:0][31:0] wd;
  logic dwe; logic [4:0] da; logic [31:0] dd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  regfile #(.NR(NR), .NW(NW)) dut (.clk, .rst_n, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd),
                                   .dbg_we(dwe), .dbg_addr(da), .dbg_wdata(dd));
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; wa = 0; wd = 0; dwe = 0; da = 0; dd = 0; ra = 0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin
        ra[p] = 5'($urandom);
        #0;
      end
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rd[p] !== model[ra[p]]) begin failures++; $display("FAIL r%0d %h vs %h", ra[p], rd[p], model[ra[p]]); end
      end
      dwe = ($urandom_range(0, 7) == 0); da = 5'($urandom); dd = $urandom;
      for (int w = 0; w < NW; w++) begin
        we[w] = $urandom_range(0, 1); wa[w] = 5'($urandom_range(0, 7)); wd[w] = $urandom;
      end
      if (dwe) model[da] = dd;
      for (int w = 0; w < NW; w++) if (we[w]) model[wa[w]] = wd[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
