// Self-checking test of one thread's delay buffer with the ISA unit set
// (2 L, 2 S, 2 M, 2 D; latencies 1, 1, 2, 5).  The testbench plays the part
// of the functional units and the copy-back unit: each cycle a random subset
// of units (each at most once per EP) allocates an entry with the tag
// "current EP + latency - 1" and delivers its result latency-1 cycles later;
// EP boundaries arrive at random, so EPs last one or more cycles.  A model
// here predicts, for every boundary, exactly which results are written to the
// register file, and the write ports are compared as a set (register, value).
// Both commit paths are exercised: from an entry (results that wait for later
// boundaries) and direct (a latency-1 result in its own boundary cycle).
module tb_delay_buffer;
  import smt_vliw_pkg::*;
  localparam int NFU = 8, NSLOT = 18, NCM = NSLOT + NFU;
  localparam int LATS[NFU] = '{1, 1, 1, 1, 2, 2, 5, 5};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [NFU-1:0] av, wv; logic [NFU-1:0][7:0] atag; logic [NFU-1:0][4:0] adst, aslot, wslot;
  logic [NFU-1:0][31:0] wdata; logic cen; logic [7:0] ctag;
  logic [NCM-1:0] cwe; logic [NCM-1:0][4:0] caddr; logic [NCM-1:0][31:0] cdata; logic [4:0] occ;
  delay_buffer dut (.clk, .rst_n, .alloc_valid(av), .alloc_tag(atag), .alloc_dst(adst), .alloc_slot(aslot),
    .wb_valid(wv), .wb_slot(wslot), .wb_data(wdata), .commit_en(cen), .commit_tag(ctag),
    .cm_we(cwe), .cm_addr(caddr), .cm_data(cdata), .occupancy(occ));

  typedef struct { int due; int unit; logic [4:0] slot; logic [31:0] data; logic [7:0] tag; logic [4:0] dst; } op_t;
  op_t ops[$];

  initial begin
    int cur = 0, n_commit = 0, n_direct = 0, n_late = 0, max_occ = 0;
    bit used[NFU];
    for (int u = 0; u < NFU; u++) used[u] = 0;
    av = 0; wv = 0; atag = 0; adst = 0; wslot = 0; wdata = 0; cen = 0; ctag = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      op_t e; string got[$], want[$]; int nw;
      got.delete(); want.delete(); av = 0;
      for (int u = 0; u < NFU; u++)
        if (!used[u] && $urandom_range(0, 2) == 0) begin
          av[u] = 1; used[u] = 1; atag[u] = 8'(cur + LATS[u] - 1); adst[u] = 5'($urandom);
        end
      #1;
      for (int u = 0; u < NFU; u++)
        if (av[u]) begin
          e.due = cyc + LATS[u] - 1; e.unit = u; e.slot = aslot[u]; e.data = $urandom;
          e.tag = atag[u]; e.dst = adst[u];
          ops.push_back(e);
        end
      wv = 0;
      foreach (ops[i])
        if (ops[i].due == cyc) begin
          wv[ops[i].unit] = 1; wslot[ops[i].unit] = ops[i].slot; wdata[ops[i].unit] = ops[i].data;
        end
      cen = $urandom_range(0, 1); ctag = 8'(cur);
      #1;
      if (cen)
        foreach (ops[i]) if (ops[i].tag == 8'(cur)) want.push_back($sformatf("%0d=%h", ops[i].dst, ops[i].data));
      nw = 0;
      for (int p = 0; p < NCM; p++)
        if (cwe[p]) begin
          got.push_back($sformatf("%0d=%h", caddr[p], cdata[p]));
          if (p >= NSLOT) n_direct++;
        end
      got.sort(); want.sort();
      checks++;
      if (got != want) begin failures++; $display("FAIL cyc %0d got %p want %p", cyc, got, want); end
      foreach (ops[i]) if (cen && ops[i].tag == 8'(cur) && ops[i].due < cyc) n_late++;
      n_commit += got.size();
      if (int'(occ) > max_occ) max_occ = int'(occ);
      checks++;
      if (int'(occ) > NSLOT) begin failures++; $display("FAIL occupancy %0d", occ); end
      @(posedge clk); #1;
      if (cen) begin
        for (int i = ops.size() - 1; i >= 0; i--) if (ops[i].tag == 8'(cur)) ops.delete(i);
        cur++;
        for (int u = 0; u < NFU; u++) used[u] = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (n_direct == 0 || n_late == 0 || n_commit < 1000) begin failures++; $display("FAIL coverage"); end
    $display("commits=%0d direct=%0d waited=%0d max occupancy=%0d", n_commit, n_direct, n_late, max_occ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
