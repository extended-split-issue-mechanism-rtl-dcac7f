// Self-checking test of the copy-back unit: random EP-boundary patterns for
// four threads and random unit-to-thread assignments.  A counter model kept
// here checks each thread's current EP number, that a commit is requested on
// exactly the boundary cycles with the current EP number as the tag, and that
// every unit gets the tag "current EP of its thread + latency - 1" for its
// class (L, S: +0, M: +1, D: +4), including wrap-around of the counters.
module tb_copyback_unit;
  import smt_vliw_pkg::*;
  localparam int NT = 4, NFU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [NT-1:0] bnd, cen; logic [NT-1:0][7:0] cur, ctag; logic [NFU-1:0][1:0] ut; logic [NFU-1:0][7:0] atag;
  copyback_unit #(.NT(NT)) dut (.clk, .rst_n, .boundary(bnd), .cur_ep(cur), .commit_en(cen),
    .commit_tag(ctag), .unit_thread(ut), .alloc_tag(atag));
  localparam int LATS[NFU] = '{1, 1, 1, 1, 2, 2, 5, 5};

  initial begin
    int m[NT];
    m = '{0, 0, 0, 0};
    bnd = 0; ut = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bnd = 4'($urandom) | 4'(cyc % 7 == 0 ? 4'hf : 4'h0);
      ut = 16'($urandom);
      #1;
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (cur[t] != 8'(m[t]) || cen[t] != bnd[t] || ctag[t] != 8'(m[t])) begin
          failures++; $display("FAIL thread %0d cyc %0d cur %0d/%0d", t, cyc, cur[t], m[t] % 256);
        end
      end
      for (int u = 0; u < NFU; u++) begin
        checks++;
        if (atag[u] != 8'(m[ut[u]] + LATS[u] - 1)) begin
          failures++; $display("FAIL unit %0d cyc %0d tag %0d", u, cyc, atag[u]);
        end
      end
      @(posedge clk); #1;
      for (int t = 0; t < NT; t++) if (bnd[t]) m[t]++;
      @(negedge clk);
    end
    checks++;
    if (m[0] < 300) begin failures++; $display("FAIL no wrap-around covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
