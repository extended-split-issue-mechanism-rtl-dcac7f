// End-to-end run of the SMT VLIW core, shared by the top-level test benches.
//
// A small assembler places one program per thread in program memory, packing
// execute packets (EPs) into fetch packets (an EP that does not fit is moved
// to the next packet and the previous EP is padded with parallel NOPs).  Each
// program first replays the register-dependence example of the design
// description (three writes of A5 with latencies 1, 2 and 5 in one EP, then
// readers in the next EPs), then runs a loop with a predicated delayed branch
// that sums an array, its squares and three times each element, stores the
// three totals and ends in a branch-to-self loop.  Expected register and
// memory values are computed here from the test data.
//
// Run 1 has thread 0 alone; run 2 has all threads.  The cycle at which
// thread 0 completes its 40th EP must be the same in both runs (the highest
// priority thread is not slowed by the others).  The test also counts the
// mechanisms it must see: split-issued EPs, deferred operations, fetches for
// lower-priority threads, branch redirects, delayed commits, multi-cycle NOPs
// and, in decoupled configurations, operations moved to another unit.
module tb_smt_run
  import smt_vliw_pkg::*;
#(
  parameter int NT = 4,
  parameter int NL = 2,
  parameter int NS = 2,
  parameter int NM = 2,
  parameter int ND = 2,
  parameter bit USE_DEFAULTS = 1'b1,  // instantiate the core with no parameter list
  parameter bit EXPECT_MOVED = 1'b0
) ();
  localparam int FPAW = 11;
  localparam int DAW  = 14;
  localparam int PCW  = FPAW + 3;
  localparam int NFU  = NL + NS + NM + ND;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NT-1:0]           thread_en, run_en, halted;
  int                      n_redir_t [NT];
  logic [NT-1:0][PCW-1:0]  start_pc;
  logic                    pm_load_we;
  logic [PCW-1:0]          pm_load_addr;
  logic [31:0]             pm_load_data;
  logic                    dm_dbg_we;
  logic [DAW-1:0]          dm_dbg_addr;
  logic [31:0]             dm_dbg_wdata, dm_dbg_rdata;
  logic                    rf_dbg_we;
  logic [1:0]              rf_dbg_thread;
  logic [4:0]              rf_dbg_addr;
  logic [31:0]             rf_dbg_wdata, rf_dbg_rdata;
  logic [NT-1:0]           ev_boundary, ev_split, ev_deferred, ev_redirect, ev_late_commit;
  logic                    ev_moved, ev_fetch;
  logic [$clog2(NFU+1)-1:0] ev_issued;
  logic [1:0]              ev_fetch_thread;

  if (USE_DEFAULTS) begin : g_dut
    smt_vliw_top dut (.*);
  end else begin : g_dut
    smt_vliw_top #(.NT(NT), .NL(NL), .NS(NS), .NM(NM), .ND(ND)) dut (.*);
  end

  // A thread that has reached its branch-to-self halt loop (its loop took
  // loop_n - 1 taken branches, then two halt iterations) is switched off so it
  // stops spending fetch slots on the loop.
  assign thread_en = run_en & ~halted;
  always @(posedge clk)
    if (!rst_n) begin
      halted <= '0;
      for (int t = 0; t < NT; t++) n_redir_t[t] <= 0;
    end else
      for (int t = 0; t < NT; t++)
        if (ev_redirect[t]) begin
          n_redir_t[t] <= n_redir_t[t] + 1;
          if (n_redir_t[t] + 1 >= loop_n(t) + 1) halted[t] <= 1'b1;
        end

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ assembler
  localparam int MAXEP = 32;
  logic [31:0] ep_w [MAXEP][8];
  int          ep_n [MAXEP];
  int          ep_tgt [MAXEP];   // EP index a branch in this EP jumps to, or -1
  int          n_eps;
  int          ep_addr [MAXEP];

  function automatic void ep_new();
    ep_n[n_eps] = 0;
    ep_tgt[n_eps] = -1;
    n_eps++;
  endfunction
  function automatic void ep_op(logic [31:0] w);
    ep_w[n_eps-1][ep_n[n_eps-1]] = w;
    ep_n[n_eps-1]++;
  endfunction

  localparam logic [4:0] A1 = 5'd1, A2 = 5'd2, A5 = 5'd5, A6 = 5'd6, A7 = 5'd7, A8 = 5'd8;
  localparam logic [4:0] B0 = 5'd16, B3 = 5'd19, B6 = 5'd22, B7 = 5'd23, B9 = 5'd25;
  localparam logic [4:0] B10 = 5'd26, B11 = 5'd27, B12 = 5'd28, B13 = 5'd29;

  function automatic int data_base(int t); return 1000 + 100 * t; endfunction
  function automatic int result_addr(int t); return 3000 + 10 * t; endfunction
  function automatic int loop_n(int t); return 5 + t; endfunction

  // Builds thread t's program as a list of EPs.
  function automatic void build(int t);
    int db, ra;
    db = data_base(t);
    ra = result_addr(t);
    n_eps = 0;
    // set-up
    ep_new(); ep_op(op_k14(1, 0, S_MVK, A1, 14'(db)));     ep_op(op_k14(0, 1, S_MVK, A2, 14'd7));
    ep_new(); ep_op(op_k14(1, 0, S_MVK, A5, 14'd3));       ep_op(op_k14(0, 1, S_MVK, A8, 14'(db + 1)));
    // dependence example: A5 written by add (lat 1), mul (lat 2), load (lat 5)
    ep_new(); ep_op(op_rrr(1, CL_L, 0, L_ADD, A5, A1, A2));
              ep_op(op_rri(1, CL_M, 0, M_MPY, A5, A5, 8'd4));
              ep_op(op_rri(0, CL_D, 0, D_LDW, A5, A1, 8'd0));
    ep_new(); ep_op(op_rrr(0, CL_M, 1, M_MPY, A1, A5, A5));
    ep_new(); ep_op(op_rrr(1, CL_L, 1, L_SUB, A6, A1, A5));
              ep_op(op_rri(0, CL_D, 1, D_LDW, A7, A8, 8'd0));
    ep_new(); ep_op(op_nop(0, 4'd5));
    // loop set-up (EP 6)
    ep_new(); ep_op(op_k14(1, 0, S_MVK, B0, 14'(loop_n(t))));
              ep_op(op_k14(1, 1, S_MVK, B3, 14'(db)));
              ep_op(op_rrr(0, CL_L, 0, L_XOR, B6, B6, B6));
    // loop body (EP 7 .. 11)
    ep_new(); ep_op(op_rri(1, CL_D, 0, D_LDW, B7, B3, 8'd0));
              ep_op(op_rri(1, CL_S, 0, S_ADD, B3, B3, 8'd1));
              ep_op(op_rri(1, CL_L, 0, L_SUB, B0, B0, 8'd1));
              ep_op(op_rrr(1, CL_L, 1, L_ADD, B10, B10, B9));
              ep_op(op_rrr(0, CL_S, 1, S_ADD, B12, B12, B11));
    ep_new(); ep_op(with_pred(op_k14(0, 0, S_B, 5'd0, 14'd0), 1'b0, 3'b100)); ep_tgt[n_eps-1] = 7;
    ep_new(); ep_op(op_nop(0, 4'd3));
    ep_new(); ep_op(op_rrr(1, CL_L, 1, L_ADD, B6, B6, B7));
              ep_op(op_rrr(1, CL_M, 0, M_MPY, B9, B7, B7));
              ep_op(op_rri(0, CL_M, 1, M_MPY, B11, B7, 8'd3));
    ep_new(); ep_op(op_nop(0, 4'd1));
    // epilogue (EP 12 .. 14)
    ep_new(); ep_op(op_rrr(1, CL_L, 1, L_ADD, B10, B10, B9));
              ep_op(op_rrr(1, CL_S, 1, S_ADD, B12, B12, B11));
              ep_op(op_k14(0, 0, S_MVK, B13, 14'(ra)));
    ep_new(); ep_op(op_rri(1, CL_D, 0, D_STW, B6, B13, 8'd0));
              ep_op(op_rri(0, CL_D, 1, D_STW, B10, B13, 8'd1));
    ep_new(); ep_op(op_rri(0, CL_D, 0, D_STW, B12, B13, 8'd2));
    // halt (EP 15, 16)
    ep_new(); ep_op(op_k14(0, 0, S_B, 5'd0, 14'd0)); ep_tgt[n_eps-1] = 15;
    ep_new(); ep_op(op_nop(0, 4'd5));
  endfunction

  logic [31:0] image [2**PCW];   // program words being assembled

  // Lays the EPs out from word address base; returns the first free word.
  function automatic int layout(int base);
    int a, last_start;
    logic [31:0] w;
    a = base;
    last_start = -1;
    for (int e = 0; e < n_eps; e++) begin
      if ((a % 8) + ep_n[e] > 8) begin
        // pad the previous EP with parallel NOPs up to the packet end
        image[a - 1][31] = 1'b1;
        while (a % 8 != 0) begin
          w = op_nop((a % 8) != 7, 4'd1);
          image[a] = w;
          a++;
        end
      end
      ep_addr[e] = a;
      for (int i = 0; i < ep_n[e]; i++) begin
        image[a] = ep_w[e][i];
        a++;
      end
      last_start = e;
    end
    // branch targets
    for (int e = 0; e <= last_start; e++)
      if (ep_tgt[e] >= 0)
        for (int i = 0; i < ep_n[e]; i++)
          if (ep_w[e][i][25:24] == CL_S && ep_w[e][i][22:19] == S_B)
            image[ep_addr[e] + i][13:0] = 14'(ep_addr[ep_tgt[e]]);
    return a;
  endfunction

  task automatic load_words(int from, int to);
    for (int a = from; a < to; a++) begin
      @(negedge clk);
      pm_load_we = 1'b1; pm_load_addr = PCW'(a); pm_load_data = image[a];
    end
    @(negedge clk);
    pm_load_we = 1'b0;
  endtask

  // ---------------------------------------------------------- test data
  int unsigned xdata [NT][16];

  task automatic write_dm(int addr, logic [31:0] v);
    @(negedge clk);
    dm_dbg_we = 1'b1; dm_dbg_addr = DAW'(addr); dm_dbg_wdata = v;
    @(negedge clk);
    dm_dbg_we = 1'b0;
  endtask

  task automatic read_rf(input int t, input logic [4:0] r, output logic [31:0] v);
    rf_dbg_thread = 2'(t);
    rf_dbg_addr = r;
    #1;
    v = rf_dbg_rdata;
  endtask

  // event counters
  int n_split, n_deferred, n_fetch_low, n_redirect, n_late, n_moved, n_nop_ep, n_issued_ops;
  int t0_boundaries, t0_mark, run_start;
  bit counting;

  always @(posedge clk) if (rst_n && counting) begin
    for (int t = 0; t < NT; t++) begin
      if (ev_split[t]) n_split++;
      if (ev_deferred[t]) n_deferred++;
      if (ev_redirect[t]) n_redirect++;
      if (ev_late_commit[t]) n_late++;
    end
    if (ev_fetch && ev_fetch_thread != 2'd0) n_fetch_low++;
    if (ev_moved) n_moved++;
    n_issued_ops += int'(ev_issued);
    if (ev_boundary[0] && ev_issued == 0 && !ev_deferred[0]) n_nop_ep++;
    if (ev_boundary[0]) begin
      t0_boundaries++;
      if (t0_boundaries == 40) t0_mark = cycle;
    end
  end

  task automatic run(input logic [NT-1:0] en, output int mark, input int ncycles);
    rst_n = 1'b0;
    run_en = en;
    t0_boundaries = 0;
    t0_mark = -1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run_start = cycle;
    counting = 1'b1;
    repeat (ncycles) @(posedge clk);
    counting = 1'b0;
    mark = t0_mark - run_start;
  endtask

  task automatic check_thread(int t);
    int db, ra;
    logic [31:0] s, sq, tr, v;
    db = data_base(t);
    ra = result_addr(t);
    s = 0; sq = 0; tr = 0;
    for (int i = 0; i < loop_n(t); i++) begin
      s  += xdata[t][i];
      sq += xdata[t][i] * xdata[t][i];
      tr += 3 * xdata[t][i];
    end
    read_rf(t, A1, v); check(v == 32'((db + 7) * (db + 7)), $sformatf("t%0d A1 (mul of add result)", t));
    read_rf(t, A5, v); check(v == xdata[t][0], $sformatf("t%0d A5 (load, last writer)", t));
    read_rf(t, A6, v); check(v == 32'(db - 12), $sformatf("t%0d A6 = old A1 - mul result", t));
    read_rf(t, A7, v); check(v == xdata[t][1], $sformatf("t%0d A7 (second load)", t));
    dm_dbg_addr = DAW'(ra);     #1; check(dm_dbg_rdata == s,  $sformatf("t%0d sum %0d vs %0d", t, dm_dbg_rdata, s));
    dm_dbg_addr = DAW'(ra + 1); #1; check(dm_dbg_rdata == sq, $sformatf("t%0d sum of squares", t));
    dm_dbg_addr = DAW'(ra + 2); #1; check(dm_dbg_rdata == tr, $sformatf("t%0d sum of 3x", t));
  endtask

  initial begin
    int a, mark_alone, mark_smt;
    run_en = '0;
    pm_load_we = 1'b0; pm_load_addr = '0; pm_load_data = '0;
    dm_dbg_we = 1'b0; dm_dbg_addr = '0; dm_dbg_wdata = '0;
    rf_dbg_we = 1'b0; rf_dbg_thread = '0; rf_dbg_addr = '0; rf_dbg_wdata = '0;
    counting = 1'b0;
    n_split = 0; n_deferred = 0; n_fetch_low = 0; n_redirect = 0; n_late = 0;
    n_moved = 0; n_nop_ep = 0; n_issued_ops = 0;
    // programs: thread t at word 128 * t
    for (int t = 0; t < NT; t++) begin
      build(t);
      a = layout(128 * t);
      load_words(128 * t, a);
      start_pc[t] = PCW'(128 * t);
      for (int i = 0; i < loop_n(t); i++) begin
        xdata[t][i] = $urandom_range(0, 2000);
        write_dm(data_base(t) + i, xdata[t][i]);
      end
    end

    // run 1: thread 0 alone
    run(1, mark_alone, 400);
    check_thread(0);
    $display("thread 0 alone: 40th EP at cycle %0d", mark_alone);
    for (int t = 0; t < NT; t++) begin
      write_dm(result_addr(t), 0); write_dm(result_addr(t) + 1, 0); write_dm(result_addr(t) + 2, 0);
    end

    // run 2: all threads
    n_split = 0; n_deferred = 0; n_fetch_low = 0; n_redirect = 0; n_late = 0;
    n_moved = 0; n_nop_ep = 0; n_issued_ops = 0;
    run('1, mark_smt, 800);
    for (int t = 0; t < NT; t++) check_thread(t);
    $display("thread 0 with %0d threads: 40th EP at cycle %0d", NT, mark_smt);
    check(mark_alone > 0 && mark_alone == mark_smt, "thread 0 timing unchanged by other threads");

    $display("events: split=%0d deferred=%0d low-prio fetches=%0d redirects=%0d delayed commits=%0d nop EPs=%0d moved=%0d ops=%0d",
             n_split, n_deferred, n_fetch_low, n_redirect, n_late, n_nop_ep, n_moved, n_issued_ops);
    check(n_split > 0, "split-issued EP seen");
    check(n_deferred > 0, "deferred operation seen");
    check(n_fetch_low > 0, "fetch for a lower-priority thread seen");
    check(n_redirect > 0, "branch redirect seen");
    check(n_late > 0, "delayed (N > 0) commit seen");
    check(n_nop_ep > 0, "multi-cycle NOP EP seen");
    if (EXPECT_MOVED) check(n_moved > 0, "operation moved to another unit seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
