// Self-checking test of the data memory: random reads and writes on both
// ports and the debug port against a model; port reads return one cycle
// after the request, and a read and a write of one word in a cycle return
// the old word.
module tb_data_memory;
  import smt_vliw_pkg::*;
  localparam int AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] re, we; logic [1:0][AW-1:0] addr; logic [1:0][31:0] wdata, rdata;
  logic dwe; logic [AW-1:0] da; logic [31:0] dwd, drd;
  logic [31:0] model [2**AW]; logic [1:0][31:0] exp_rd; logic [1:0] exp_v;
  int checks = 0, failures = 0;
  data_memory #(.NP(2), .AW(AW)) dut (.clk, .re, .we, .addr, .wdata, .rdata, .dbg_we(dwe), .dbg_addr(da),
                                      .dbg_wdata(dwd), .dbg_rdata(drd));
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    re = 0; we = 0; addr = 0; wdata = 0; exp_v = 0; exp_rd = 0;
    // fill through the debug port
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); dwe = 1; da = AW'(i); dwd = $urandom; model[i] = dwd;
    end
    @(negedge clk); dwe = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) if (exp_v[p]) begin
        checks++;
        if (rdata[p] !== exp_rd[p]) begin failures++; $display("FAIL port %0d", p); end
      end
      da = AW'($urandom); #1; checks++;
      if (drd !== model[da]) begin failures++; $display("FAIL debug read"); end
      for (int p = 0; p < 2; p++) begin
        re[p] = $urandom_range(0, 1); we[p] = $urandom_range(0, 1);
        addr[p] = AW'(p == 0 ? $urandom_range(0, 31) : $urandom_range(32, 63)); wdata[p] = $urandom;
        exp_v[p] = re[p]; exp_rd[p] = model[addr[p]];
      end
      for (int p = 0; p < 2; p++) if (we[p]) model[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
