// Delay buffers of one thread: results wait here until their phase-2 commit.
//
// Every hardware unit owns a group of entries in each thread's delay buffer:
// as many as its latency (1 for L and S, 2 for M, 5 for D), 18 in all with two
// units of each class; a unit whose class count differs from the ISA's gets
// twice as many, since it may take both operations of a class from one EP.
// When an operation reaches E1, its unit allocates the next entry of its
// group in round-robin order, recording the destination register and the
// commit tag: the number of the EP boundary at which the result may be
// written (the operation's EP + latency - 1).  The entry number travels with
// the operation and the unit writes its result into the entry when it
// completes.  An operation whose commit falls on the boundary of the very
// cycle it is in E1 (latency 1, last set of its EP) is committed straight from
// its unit's output without taking an entry.  When the copy-back unit signals a boundary with a tag, every
// entry holding that tag is committed to the register file and freed; a
// result completing in the same cycle is forwarded straight through.  Because
// a thread's operations issue in order and a unit's entries commit in order,
// round-robin allocation always finds a free entry.  Entry counts and the
// commit rule follow the design description; the organisation per unit is
// this design's own.
module delay_buffer
  import smt_vliw_pkg::*;
#(
  parameter int NL     = 2,
  parameter int NS     = 2,
  parameter int NM     = 2,
  parameter int ND     = 2,
  parameter int SLOT_W = 5,
  localparam int NFU   = NL + NS + NM + ND,
  localparam int NSLOT = unit_base(NL + NS + NM + ND, NL, NS, NM, ND),
  localparam int NCM   = NSLOT + NFU   // commit ports: entries, then direct
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NFU-1:0]                   alloc_valid,
  input  logic [NFU-1:0][EPC_W-1:0]        alloc_tag,
  input  logic [NFU-1:0][4:0]              alloc_dst,
  output logic [NFU-1:0][SLOT_W-1:0]       alloc_slot,
  input  logic [NFU-1:0]                   wb_valid,
  input  logic [NFU-1:0][SLOT_W-1:0]       wb_slot,
  input  logic [NFU-1:0][XLEN-1:0]         wb_data,
  input  logic                             commit_en,
  input  logic [EPC_W-1:0]                 commit_tag,
  output logic [NCM-1:0]                   cm_we,
  output logic [NCM-1:0][4:0]              cm_addr,
  output logic [NCM-1:0][XLEN-1:0]         cm_data,
  output logic [$clog2(NSLOT+1)-1:0]       occupancy
);
  typedef struct packed {
    logic             valid;
    logic             ready;
    logic [EPC_W-1:0] tag;
    logic [4:0]       dst;
    logic [XLEN-1:0]  data;
  } entry_t;

  entry_t [NSLOT-1:0]        ent;
  logic   [NFU-1:0][SLOT_W-1:0] ptr;
  logic   [NSLOT-1:0]        wb_hit;
  logic   [NSLOT-1:0][XLEN-1:0] wb_val;
  logic   [NFU-1:0]          direct;    // committed in the cycle it is allocated

  function automatic int slot_unit(int s);
    int r;
    r = 0;
    for (int u = 0; u < NFU; u++)
      if (s >= unit_base(u, NL, NS, NM, ND)) r = u;
    return r;
  endfunction

  always_comb
    for (int u = 0; u < NFU; u++)
      alloc_slot[u] = SLOT_W'(unit_base(u, NL, NS, NM, ND)) + ptr[u];

  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      wb_hit[s] = wb_valid[slot_unit(s)] && wb_slot[slot_unit(s)] == SLOT_W'(s);
      wb_val[s] = wb_data[slot_unit(s)];
      cm_we[s]   = commit_en && ent[s].valid && ent[s].tag == commit_tag;
      cm_addr[s] = ent[s].dst;
      cm_data[s] = wb_hit[s] ? wb_val[s] : ent[s].data;
    end
    for (int u = 0; u < NFU; u++) begin
      direct[u] = alloc_valid[u] && commit_en && alloc_tag[u] == commit_tag;
      cm_we[NSLOT + u]   = direct[u];
      cm_addr[NSLOT + u] = alloc_dst[u];
      cm_data[NSLOT + u] = wb_data[u];
    end
  end

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < NSLOT; s++) occupancy = occupancy + ent[s].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent <= '0;
      ptr <= '0;
    end else begin
      for (int s = 0; s < NSLOT; s++)
        if (cm_we[s]) ent[s].valid <= 1'b0;
      for (int u = 0; u < NFU; u++) begin
        if (alloc_valid[u] && !direct[u]) begin
          ent[alloc_slot[u]].valid <= 1'b1;
          ent[alloc_slot[u]].ready <= 1'b0;
          ent[alloc_slot[u]].tag   <= alloc_tag[u];
          ent[alloc_slot[u]].dst   <= alloc_dst[u];
          ptr[u] <= (int'(ptr[u]) == unit_depth(u, NL, NS, NM, ND) - 1) ? '0 : ptr[u] + 1'b1;
        end
      end
      // results arriving (a latency-1 result arrives in its allocation cycle)
      for (int s = 0; s < NSLOT; s++)
        if (wb_hit[s]) begin
          ent[s].data  <= wb_val[s];
          ent[s].ready <= 1'b1;
        end
    end
  end

  // An entry is committed only once its result is there, and a unit never
  // allocates over an entry that is still waiting.
  for (genvar s = 0; s < NSLOT; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     cm_we[s] |-> (ent[s].ready || wb_hit[s]))
      else $error("delay_buffer: entry %0d committed before its result arrived", s);
  end
  for (genvar u = 0; u < NFU; u++) begin : g_chk_direct
    assert property (@(posedge clk) disable iff (!rst_n) direct[u] |-> wb_valid[u])
      else $error("delay_buffer: unit %0d committed directly without a result", u);
  end
  for (genvar u = 0; u < NFU; u++) begin : g_chk_alloc
    assert property (@(posedge clk) disable iff (!rst_n)
                     alloc_valid[u] |-> (!ent[alloc_slot[u]].valid || cm_we[alloc_slot[u]]))
      else $error("delay_buffer: unit %0d allocated an occupied entry", u);
  end
endmodule
