// Simultaneous-multithreaded VLIW DSP with extended split-issue.
//
// A TMS320C6201-style 8-wide clustered VLIW core that runs up to four threads
// at once.  Each thread has its own program counter, PR fetch-packet buffer,
// DP stage, register files A and B and set of delay buffers; the functional
// units, the fetch stages, EP-combine, DC and the copy-back unit are shared.
//
// Pipeline (one column per cycle for an operation):
//   PG PS PW PR   fetch, multiplexed between threads (fetch_unit, fp_buffer)
//   DP            per thread: current execute packet (EP) of the head packet
//   EP-combine    split-issue of EP subsets to free units, thread 0 first
//   DC            decode, EP-boundary signal
//   E1 ..         operands read from the thread's register file, units run
//                 (L, S: 1 cycle, M: 2, D: 5), results go to delay buffers
//   phase-2       at each of a thread's EP boundaries the copy-back unit
//                 commits the results whose latency, counted in EPs, is up
//
// Because results reach the architectural registers only at EP boundaries,
// N boundaries after issue for an operation of latency N+1, each thread sees
// exactly the register timing its compiler assumed, however its EPs were
// split across cycles or interleaved with other threads.  The number of units
// per class is a parameter (hardware/ISA decoupling): e.g. NM = 1 gives one
// multiplier serving both ISA multipliers.
//
// Interface: thread_en and start_pc (word addresses, sampled during reset)
// choose the running threads; the program memory load port, the data memory
// debug port and a register debug port let a test bench set up and inspect a
// run; the ev_* outputs report, cycle by cycle, the mechanisms at work.
// Sizes of memories, operation encoding and widths are this design's own
// choices where the description gives none (see the package).
module smt_vliw_top
  import smt_vliw_pkg::*;
#(
  parameter int NT    = 4,    // hardware threads
  parameter int NL    = 2,    // ALUs
  parameter int NS    = 2,    // shifters
  parameter int NM    = 2,    // multipliers
  parameter int ND    = 2,    // load/store units
  parameter int FPAW  = 11,   // program memory: 2^11 fetch packets (64 KB)
  parameter int DAW   = 14,   // data memory: 2^14 words (64 KB)
  parameter int FPBUF = 4,    // PR-stage fetch packets per thread
  localparam int NFU  = NL + NS + NM + ND,
  localparam int PCW  = FPAW + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NT-1:0]           thread_en,
  input  logic [NT-1:0][PCW-1:0]  start_pc,
  // program loading
  input  logic                    pm_load_we,
  input  logic [PCW-1:0]          pm_load_addr,
  input  logic [31:0]             pm_load_data,
  // data memory debug port
  input  logic                    dm_dbg_we,
  input  logic [DAW-1:0]          dm_dbg_addr,
  input  logic [XLEN-1:0]         dm_dbg_wdata,
  output logic [XLEN-1:0]         dm_dbg_rdata,
  // register debug port
  input  logic                    rf_dbg_we,
  input  logic [1:0]              rf_dbg_thread,
  input  logic [4:0]              rf_dbg_addr,
  input  logic [XLEN-1:0]         rf_dbg_wdata,
  output logic [XLEN-1:0]         rf_dbg_rdata,
  // observation
  output logic [NT-1:0]           ev_boundary,   // EP of the thread completed at issue
  output logic [NT-1:0]           ev_split,      // ... over more than one cycle
  output logic [NT-1:0]           ev_deferred,   // an operation of the thread waited for a unit
  output logic                    ev_moved,      // operation sent to a non-ISA unit
  output logic [$clog2(NFU+1)-1:0] ev_issued,    // operations issued this cycle
  output logic                    ev_fetch,      // PG fetched for ev_fetch_thread
  output logic [1:0]              ev_fetch_thread,
  output logic [NT-1:0]           ev_redirect,   // taken branch reached its target
  output logic [NT-1:0]           ev_late_commit // a commit of a result older than its EP
);
  localparam int SLOT_W = 5;
  localparam int NSLOT  = unit_base(NFU, NL, NS, NM, ND);
  localparam int NCM    = NSLOT + NFU;   // commit ports of a delay buffer
  localparam int NRP    = 4 * NFU;       // src1, src2, store data, predicate
  localparam int CW     = $clog2(FPBUF + 1);

  // ---------------------------------------------------------------- fetch
  logic [NT-1:0]                  redirect;
  logic [NT-1:0][13:0]            redirect_tgt;
  logic [NT-1:0][PCW-1:0]         redirect_pc;
  logic [NT-1:0][CW-1:0]          buf_count;
  logic                           pm_re;
  logic [FPAW-1:0]                pm_addr;
  logic [FP_OPS-1:0][31:0]        pm_rdata;
  logic [NT-1:0]                  push;
  logic [FP_OPS-1:0][31:0]        push_fp;
  logic [2:0]                     push_start;

  always_comb
    for (int t = 0; t < NT; t++) redirect_pc[t] = PCW'(redirect_tgt[t]);

  fetch_unit #(.NT(NT), .FPAW(FPAW), .DEPTH(FPBUF)) u_fetch (
    .clk, .rst_n, .thread_en, .start_pc, .redirect, .redirect_pc, .buf_count,
    .pm_re, .pm_addr, .pm_rdata, .push, .push_fp, .push_start,
    .pg_valid(ev_fetch), .pg_thread(ev_fetch_thread)
  );

  program_memory #(.FPAW(FPAW)) u_pmem (
    .clk, .re(pm_re), .raddr(pm_addr), .rdata(pm_rdata),
    .load_we(pm_load_we), .load_addr(pm_load_addr), .load_data(pm_load_data)
  );

  // ------------------------------------------------------- PR buffers + DP
  logic [NT-1:0]                  head_valid, pop, flush;
  logic [NT-1:0][FP_OPS-1:0][31:0] head_fp;
  logic [NT-1:0][2:0]             head_start;
  logic [NT-1:0]                  ep_valid, ep_first, ep_done;
  logic [NT-1:0][FP_OPS-1:0][31:0] ep_ops;
  logic [NT-1:0][FP_OPS-1:0]      ep_pending, grant;
  logic [NT-1:0][EPC_W-1:0]       dp_ep_cnt;
  logic [NT-1:0]                  br_valid;
  logic [NT-1:0][EPC_W-1:0]       br_limit;
  logic [NT-1:0][13:0]            br_target;

  for (genvar t = 0; t < NT; t++) begin : g_thread_front
    fp_buffer #(.DEPTH(FPBUF)) u_fpbuf (
      .clk, .rst_n, .flush(flush[t]), .push(push[t]), .push_fp, .push_start,
      .pop(pop[t]), .head_valid(head_valid[t]), .head_fp(head_fp[t]),
      .head_start(head_start[t]), .count(buf_count[t])
    );
    dp_stage u_dp (
      .clk, .rst_n,
      .head_valid(head_valid[t]), .head_fp(head_fp[t]), .head_start(head_start[t]),
      .pop(pop[t]), .flush(flush[t]),
      .ep_valid(ep_valid[t]), .ep_ops(ep_ops[t]), .ep_pending(ep_pending[t]),
      .ep_first(ep_first[t]), .grant(grant[t]), .ep_done(ep_done[t]),
      .ep_cnt(dp_ep_cnt[t]),
      .br_valid(br_valid[t]), .br_limit(br_limit[t]), .br_target(br_target[t]),
      .redirect(redirect[t]), .redirect_pc(redirect_tgt[t])
    );
  end

  // ------------------------------------------------------ EP-combine + DC
  logic [NT-1:0]                  boundary_now;
  logic [NFU-1:0]                 iss_valid;
  logic [NFU-1:0][1:0]            iss_thread;
  logic [NFU-1:0][31:0]           iss_op;
  logic [NT-1:0]                  iss_boundary;
  fu_cmd_t [NFU-1:0]              e1_cmd;
  logic [NT-1:0]                  e1_boundary;

  ep_combine #(.NT(NT), .NL(NL), .NS(NS), .NM(NM), .ND(ND)) u_epc (
    .clk, .rst_n, .ep_valid, .ep_ops, .ep_pending, .grant, .boundary(boundary_now),
    .iss_valid, .iss_thread, .iss_op, .iss_boundary,
    .n_granted(ev_issued), .any_moved(ev_moved)
  );

  dc_stage #(.NT(NT), .NFU(NFU)) u_dc (
    .clk, .rst_n, .iss_valid, .iss_thread, .iss_op, .iss_boundary,
    .e1_cmd, .e1_boundary
  );

  assign ev_boundary = ep_done;
  always_comb
    for (int t = 0; t < NT; t++) begin
      ev_split[t]    = ep_done[t] && !ep_first[t];
      ev_deferred[t] = ep_valid[t] && !ep_done[t];
    end

  // -------------------------------------------------------- copy-back unit
  logic [NT-1:0][EPC_W-1:0]       cur_ep;
  logic [NT-1:0]                  commit_en;
  logic [NT-1:0][EPC_W-1:0]       commit_tag;
  logic [NFU-1:0][1:0]            unit_thread;
  logic [NFU-1:0][EPC_W-1:0]      alloc_tag;

  always_comb
    for (int u = 0; u < NFU; u++) unit_thread[u] = e1_cmd[u].thread;

  copyback_unit #(.NT(NT), .NL(NL), .NS(NS), .NM(NM), .ND(ND)) u_cb (
    .clk, .rst_n, .boundary(e1_boundary), .cur_ep, .commit_en, .commit_tag,
    .unit_thread, .alloc_tag
  );

  // --------------------------------------- register files and delay buffers
  logic [NRP-1:0][4:0]            raddr;
  logic [NT-1:0][NRP-1:0][XLEN-1:0] rdata;
  logic [NT-1:0][NFU-1:0]         alloc_valid;
  logic [NFU-1:0][4:0]            alloc_dst;
  logic [NT-1:0][NFU-1:0][SLOT_W-1:0] alloc_slot;
  logic [NT-1:0][NFU-1:0]         db_wb_valid;
  logic [NFU-1:0]                 wb_valid;
  logic [NFU-1:0][1:0]            wb_thread;
  logic [NFU-1:0][SLOT_W-1:0]     wb_slot;
  logic [NFU-1:0][XLEN-1:0]       wb_data;
  logic [NT-1:0][NCM-1:0]         cm_we;
  logic [NT-1:0][NCM-1:0][4:0]    cm_addr;
  logic [NT-1:0][NCM-1:0][XLEN-1:0] cm_data;
  logic [NT-1:0][XLEN-1:0]        dbg_rd;

  for (genvar t = 0; t < NT; t++) begin : g_thread_back
    logic [NRP:0][4:0]            ra;
    logic [NRP:0][XLEN-1:0]       rd;
    logic [$clog2(NSLOT+1)-1:0]   occ;
    assign ra = {rf_dbg_addr, raddr};
    assign rdata[t]  = rd[NRP-1:0];
    assign dbg_rd[t] = rd[NRP];

    regfile #(.NR(NRP + 1), .NW(NCM)) u_rf (
      .clk, .rst_n, .raddr(ra), .rdata(rd),
      .we(cm_we[t]), .waddr(cm_addr[t]), .wdata(cm_data[t]),
      .dbg_we(rf_dbg_we && rf_dbg_thread == 2'(t)), .dbg_addr(rf_dbg_addr),
      .dbg_wdata(rf_dbg_wdata)
    );

    always_comb
      for (int u = 0; u < NFU; u++)
        db_wb_valid[t][u] = wb_valid[u] && wb_thread[u] == 2'(t);

    delay_buffer #(.NL(NL), .NS(NS), .NM(NM), .ND(ND), .SLOT_W(SLOT_W)) u_db (
      .clk, .rst_n,
      .alloc_valid(alloc_valid[t]), .alloc_tag, .alloc_dst, .alloc_slot(alloc_slot[t]),
      .wb_valid(db_wb_valid[t]), .wb_slot, .wb_data,
      .commit_en(commit_en[t]), .commit_tag(commit_tag[t]),
      .cm_we(cm_we[t]), .cm_addr(cm_addr[t]), .cm_data(cm_data[t]),
      .occupancy(occ)
    );
    // a result committed at a later boundary than its own EP's
    assign ev_late_commit[t] = |(cm_we[t] & ~late_mask_l1());
  end

  // Entries of the latency-1 units (L and S) always commit at their own EP.
  // occ (delay-buffer occupancy) is kept for observation in simulation.
  function automatic logic [NCM-1:0] late_mask_l1();
    logic [NCM-1:0] m;
    m = '0;
    for (int s = 0; s < unit_base(NL + NS, NL, NS, NM, ND); s++) m[s] = 1'b1;
    for (int s = NSLOT; s < NCM; s++) m[s] = 1'b1;
    return m;
  endfunction

  assign rf_dbg_rdata = dbg_rd[rf_dbg_thread];

  // ------------------------------------------------------------ execute
  logic [ND-1:0]                  dm_re, dm_we;
  logic [ND-1:0][DAW-1:0]         dm_addr;
  logic [ND-1:0][XLEN-1:0]        dm_wdata, dm_rdata;
  logic [NS-1:0]                  s_br_valid;
  logic [NS-1:0][1:0]             s_br_thread;
  logic [NS-1:0][13:0]            s_br_target;

  for (genvar u = 0; u < NFU; u++) begin : g_unit
    localparam fu_class_e CLS = unit_class(u, NL, NS, NM, ND);
    fu_cmd_t         c;
    logic [XLEN-1:0] a, b, sd, pv;
    logic            exec;
    logic [SLOT_W-1:0] slot;

    assign c  = e1_cmd[u];
    assign raddr[4*u + 0] = c.src1;
    assign raddr[4*u + 1] = c.src2;
    assign raddr[4*u + 2] = c.dst;
    assign raddr[4*u + 3] = c.pred_reg;
    assign a    = rdata[c.thread][4*u + 0];
    assign b    = c.use_imm ? c.imm : rdata[c.thread][4*u + 1];
    assign sd   = rdata[c.thread][4*u + 2];
    assign pv   = rdata[c.thread][4*u + 3];
    assign exec = c.valid && (!c.pred_en || ((pv == '0) == c.pred_z));
    assign slot = alloc_slot[c.thread][u];
    assign alloc_dst[u] = c.dst;

    always_comb
      for (int t = 0; t < NT; t++)
        alloc_valid[t][u] = exec && c.writes_reg && c.thread == 2'(t);

    if (CLS == CL_L) begin : g_l
      fu_alu #(.SLOT_W(SLOT_W)) u_l (
        .in_valid(exec), .in_thread(c.thread), .in_slot(slot), .in_opc(c.opc),
        .in_a(a), .in_b(b),
        .wb_valid(wb_valid[u]), .wb_thread(wb_thread[u]), .wb_slot(wb_slot[u]),
        .wb_data(wb_data[u])
      );
    end else if (CLS == CL_S) begin : g_s
      localparam int K = u - NL;
      fu_shift #(.SLOT_W(SLOT_W)) u_s (
        .in_valid(exec), .in_thread(c.thread), .in_slot(slot), .in_opc(c.opc),
        .in_a(a), .in_b(b),
        .wb_valid(wb_valid[u]), .wb_thread(wb_thread[u]), .wb_slot(wb_slot[u]),
        .wb_data(wb_data[u]),
        .br_valid(s_br_valid[K]), .br_thread(s_br_thread[K]), .br_target(s_br_target[K])
      );
    end else if (CLS == CL_M) begin : g_m
      fu_mult #(.SLOT_W(SLOT_W)) u_m (
        .clk, .rst_n,
        .in_valid(exec), .in_thread(c.thread), .in_slot(slot), .in_opc(c.opc),
        .in_a(a), .in_b(b),
        .wb_valid(wb_valid[u]), .wb_thread(wb_thread[u]), .wb_slot(wb_slot[u]),
        .wb_data(wb_data[u])
      );
    end else begin : g_d
      localparam int K = u - NL - NS - NM;
      fu_ldst #(.SLOT_W(SLOT_W), .AW(DAW)) u_d (
        .clk, .rst_n,
        .in_valid(exec), .in_thread(c.thread), .in_slot(slot), .in_opc(c.opc),
        .in_a(a), .in_b(b), .in_sd(sd),
        .mem_re(dm_re[K]), .mem_we(dm_we[K]), .mem_addr(dm_addr[K]),
        .mem_wdata(dm_wdata[K]), .mem_rdata(dm_rdata[K]),
        .wb_valid(wb_valid[u]), .wb_thread(wb_thread[u]), .wb_slot(wb_slot[u]),
        .wb_data(wb_data[u])
      );
    end
  end

  data_memory #(.NP(ND), .AW(DAW)) u_dmem (
    .clk, .re(dm_re), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata),
    .dbg_we(dm_dbg_we), .dbg_addr(dm_dbg_addr), .dbg_wdata(dm_dbg_wdata),
    .dbg_rdata(dm_dbg_rdata)
  );

  // Branch resolution: the target starts with the sixth EP after the branch's.
  always_comb begin
    br_valid  = '0;
    br_limit  = '0;
    br_target = '0;
    for (int k = 0; k < NS; k++)
      for (int t = 0; t < NT; t++)
        if (s_br_valid[k] && s_br_thread[k] == 2'(t)) begin
          br_valid[t]  = 1'b1;
          br_limit[t]  = cur_ep[t] + EPC_W'(6);
          br_target[t] = s_br_target[k];
        end
  end

  assign ev_redirect = redirect;
endmodule
