// Fetch unit: the PG, PS, PW and PR stages, shared between the threads.
//
// Each cycle the PG stage picks one thread and sends the address of its next
// fetch packet down the pipeline: PG -> PS -> PW, where the program memory is
// read, -> PR, where the packet arrives and is pushed into that thread's PR
// buffer.  The pick is by fixed priority (thread 0 highest) among the enabled
// threads that still have room: a thread may fetch only while its buffered
// plus in-flight packets number fewer than the buffer depth.  A thread whose
// dispatch stage is busy with a packet of several execute packets thus stops
// fetching once its buffer is full, and those otherwise idle fetch slots go to
// the next thread, which is how the fetch stages are multiplexed in the design
// description.  Thread 0 is never held back by the others.
//
// A redirect (a taken branch, once its delay slots have been dispatched) loads
// the thread's fetch address, bumps its epoch so that packets already in flight
// are dropped when they reach PR, and marks the first packet with the slot at
// which dispatch starts.  Thread start addresses are loaded while in reset.
// The four stages and the priority order follow the description; the credit
// rule and the epoch are this design's own way of realising them.
module fetch_unit
  import smt_vliw_pkg::*;
#(
  parameter int NT    = 4,    // threads
  parameter int FPAW  = 11,   // fetch-packet address width
  parameter int DEPTH = 4     // PR buffer entries per thread
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NT-1:0]           thread_en,
  input  logic [NT-1:0][FPAW+2:0] start_pc,     // word addresses, sampled in reset
  input  logic [NT-1:0]           redirect,
  input  logic [NT-1:0][FPAW+2:0] redirect_pc,
  input  logic [NT-1:0][$clog2(DEPTH+1)-1:0] buf_count,
  // program memory
  output logic                    pm_re,
  output logic [FPAW-1:0]         pm_addr,
  input  logic [FP_OPS-1:0][31:0] pm_rdata,
  // to the PR buffers
  output logic [NT-1:0]           push,
  output logic [FP_OPS-1:0][31:0] push_fp,
  output logic [2:0]              push_start,
  // observation: thread fetched in PG this cycle
  output logic                    pg_valid,
  output logic [1:0]              pg_thread
);
  typedef struct packed {
    logic            valid;
    logic [1:0]      thread;
    logic [FPAW-1:0] addr;
    logic [1:0]      epoch;
    logic [2:0]      start;
  } fstage_t;

  logic [NT-1:0][FPAW-1:0] pc;
  logic [NT-1:0][1:0]      epoch;
  logic [NT-1:0][2:0]      first_start;
  fstage_t                 ps, pw, pr;
  fstage_t                 pg;

  // packets of each thread in PS, PW and PR
  function automatic int inflight(int t, fstage_t a, fstage_t b, fstage_t c);
    int n;
    n = 0;
    if (a.valid && a.thread == 2'(t)) n++;
    if (b.valid && b.thread == 2'(t)) n++;
    if (c.valid && c.thread == 2'(t)) n++;
    return n;
  endfunction

  always_comb begin
    pg = '0;
    for (int t = NT - 1; t >= 0; t--) begin
      if (thread_en[t] && !redirect[t] &&
          (int'(buf_count[t]) + inflight(t, ps, pw, pr) < DEPTH)) begin
        pg.valid  = 1'b1;
        pg.thread = 2'(t);
      end
    end
    pg.addr  = pc[pg.thread];
    pg.epoch = epoch[pg.thread];
    pg.start = first_start[pg.thread];
  end

  assign pg_valid  = pg.valid;
  assign pg_thread = pg.thread;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps <= '0; pw <= '0; pr <= '0;
      for (int t = 0; t < NT; t++) begin
        pc[t]          <= start_pc[t][FPAW+2:3];
        first_start[t] <= start_pc[t][2:0];
        epoch[t]       <= '0;
      end
    end else begin
      ps <= pg;
      pw <= ps;
      pr <= pw;
      for (int t = 0; t < NT; t++) begin
        if (redirect[t]) begin
          pc[t]          <= redirect_pc[t][FPAW+2:3];
          first_start[t] <= redirect_pc[t][2:0];
          epoch[t]       <= epoch[t] + 1'b1;
        end else if (pg.valid && pg.thread == 2'(t)) begin
          pc[t]          <= pc[t] + 1'b1;
          first_start[t] <= '0;
        end
      end
    end
  end

  assign pm_re   = pw.valid;
  assign pm_addr = pw.addr;

  always_comb begin
    push = '0;
    for (int t = 0; t < NT; t++)
      push[t] = pr.valid && pr.thread == 2'(t) && pr.epoch == epoch[t] && !redirect[t];
  end
  assign push_fp    = pm_rdata;
  assign push_start = pr.start;
endmodule
