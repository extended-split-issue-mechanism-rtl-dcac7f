// Self-checking test of the multiplexed fetch stages with two threads.
// A program-memory model returns packets whose words encode their address;
// a buffer model pops packets at random.  Checked every cycle: a packet chosen
// in PG reaches PR and is pushed exactly three cycles later; each thread's
// packets come in address order from its start address; thread 1 is chosen
// only when thread 0 has no room; buffered plus in-flight packets never exceed
// the buffer depth; after a redirect, packets in flight are dropped and fetch
// resumes at the target with the right start slot.
module tb_fetch_unit;
  import smt_vliw_pkg::*;
  localparam int NT = 2, FPAW = 6, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NT-1:0] en, redirect, push; logic [NT-1:0][FPAW+2:0] spc, rpc;
  logic [NT-1:0][2:0] bc;
  logic pm_re; logic [FPAW-1:0] pm_addr; logic [7:0][31:0] pm_rdata, pfp; logic [2:0] pst;
  logic pgv; logic [1:0] pgt;
  int checks = 0, failures = 0;
  fetch_unit #(.NT(NT), .FPAW(FPAW), .DEPTH(DEPTH)) dut (.clk, .rst_n, .thread_en(en), .start_pc(spc),
    .redirect, .redirect_pc(rpc), .buf_count(bc), .pm_re, .pm_addr, .pm_rdata, .push, .push_fp(pfp),
    .push_start(pst), .pg_valid(pgv), .pg_thread(pgt));
  always @(posedge clk) if (pm_re) for (int k = 0; k < 8; k++) pm_rdata[k] <= {24'(pm_addr), 8'(k)};
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  typedef struct { int due; int t; int addr; int start; } exp_t;
  exp_t q [$];
  int nexta [NT]; int nexts [NT]; int cnt [NT]; int cyc; int n_t1, n_redir;

  function automatic int inflight(int t);
    int n; n = 0;
    foreach (q[i]) if (q[i].t == t) n++;
    return n;
  endfunction

  initial begin
    en = '1; redirect = 0; rpc = 0; bc = 0; pm_rdata = 0;
    spc[0] = 14'd16; spc[1] = 14'd80 + 14'd3;   // thread 1 starts mid-packet
    nexta[0] = 2; nexts[0] = 0; nexta[1] = 10; nexts[1] = 3; cnt[0] = 0; cnt[1] = 0; n_t1 = 0; n_redir = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 800; cyc++) begin
      // inputs for this cycle
      for (int t = 0; t < NT; t++) bc[t] = 3'(cnt[t]);
      redirect = '0;
      for (int t = 0; t < NT; t++)
        if ($urandom_range(0, 60) == 0) begin
          redirect[t] = 1'b1; rpc[t] = (FPAW+3)'($urandom_range(0, 2**(FPAW+3) - 1));
        end
      #1;
      // PG decision
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (cnt[t] + inflight(t) > DEPTH) begin failures++; $display("FAIL credit t%0d", t); end
      end
      if (pgv) begin
        checks++;
        if (pgt == 1 && !redirect[0] && cnt[0] + inflight(0) < DEPTH) begin
          failures++; $display("FAIL priority at %0d", cyc);
        end
        if (pgt == 1) n_t1++;
        q.push_back('{due: cyc + 3, t: int'(pgt), addr: nexta[pgt], start: nexts[pgt]});
        nexta[pgt] = (nexta[pgt] + 1) % (2**FPAW); nexts[pgt] = 0;
      end
      // PR pushes due now
      for (int t = 0; t < NT; t++) begin
        int found; found = -1;
        foreach (q[i]) if (q[i].t == t && q[i].due == cyc) found = i;
        checks++;
        if (redirect[t]) begin
          if (push[t]) begin failures++; $display("FAIL push during redirect"); end
        end else if ((found >= 0) != push[t]) begin
          failures++; $display("FAIL push t%0d at %0d", t, cyc);
        end else if (found >= 0 && (pfp[5] != {24'(q[found].addr), 8'd5} || int'(pst) != q[found].start)) begin
          failures++; $display("FAIL packet t%0d addr %h exp %0d", t, pfp[5], q[found].addr);
        end
        if (push[t]) cnt[t]++;
      end
      // retire due entries, apply redirects
      for (int i = q.size() - 1; i >= 0; i--)
        if (q[i].due == cyc || redirect[q[i].t]) q.delete(i);
      for (int t = 0; t < NT; t++)
        if (redirect[t]) begin
          nexta[t] = int'(rpc[t][FPAW+2:3]); nexts[t] = int'(rpc[t][2:0]); cnt[t] = 0; n_redir++;
        end
      // the buffer model pops at random
      for (int t = 0; t < NT; t++) if (cnt[t] > 0 && $urandom_range(0, 2) == 0) cnt[t]--;
      @(negedge clk);
    end
    checks++;
    if (n_t1 == 0 || n_redir == 0) begin failures++; $display("FAIL thread 1 never fetched / no redirect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
