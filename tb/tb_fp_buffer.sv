// Self-checking test of the PR fetch-packet buffer against a queue model:
// random pushes, pops and flushes; head, start slot and count must match.
module tb_fp_buffer;
  import smt_vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flush, push, pop, hv; logic [7:0][31:0] pfp, hfp; logic [2:0] pst, hst; logic [2:0] count;
  logic [255:0] qfp [$]; logic [2:0] qst [$];
  int checks = 0, failures = 0;
  fp_buffer #(.DEPTH(4)) dut (.clk, .rst_n, .flush, .push, .push_fp(pfp), .push_start(pst), .pop,
                              .head_valid(hv), .head_fp(hfp), .head_start(hst), .count);
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    flush = 0; push = 0; pop = 0; pfp = 0; pst = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(qfp.size()) || hv != (qfp.size() != 0) ||
          (hv && (hfp !== qfp[0] || hst != qst[0]))) begin
        failures++; $display("FAIL i=%0d count=%0d model=%0d", i, count, qfp.size());
      end
      flush = ($urandom_range(0, 40) == 0);
      pop  = (qfp.size() != 0) && $urandom_range(0, 1);
      push = (qfp.size() - (pop ? 1 : 0) < 4) && $urandom_range(0, 1);
      pfp = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pst = 3'($urandom);
      if (flush) begin qfp.delete(); qst.delete(); end
      else begin
        if (pop) begin void'(qfp.pop_front()); void'(qst.pop_front()); end
        if (push) begin qfp.push_back(pfp); qst.push_back(pst); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
