// DP stage of one thread: extracts execute packets (EPs) from fetch packets.
//
// The head of the thread's PR buffer is a fetch packet of eight operations.
// Starting at the current slot, the EP runs up to and including the first
// operation whose parallel bit is clear (an EP never crosses a packet).  The
// stage offers the EP's operations to the EP-combine stage with a mask of the
// ones still waiting for a unit.  EP-combine grants any subset in a cycle; the
// stage remembers what was issued and offers the rest next cycle.  Once every
// operation of the EP has been granted, the EP is complete: that cycle is an
// EP boundary, the EP counter advances and the stage moves to the next EP,
// popping the packet after its last EP.  An EP holding "NOP n" is followed by
// n-1 empty EPs, one per cycle, so multi-cycle NOPs still count as EPs.
//
// Branches: when an S unit resolves a taken branch of this thread, it gives
// the number of the EP that must come from the target (the branch's EP + 6,
// i.e. five delay-slot EPs).  When the EP counter reaches it, the stage stops,
// flushes its PR buffer, and redirects fetch to the target.  Issuing an EP over
// several cycles (extended split-issue) and the 5-EP branch delay follow the
// design description; counting the delay slots at dispatch, in EPs, is this
// design's own way of keeping the delayed-branch semantics.
module dp_stage
  import smt_vliw_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // PR buffer head
  input  logic                    head_valid,
  input  logic [FP_OPS-1:0][31:0] head_fp,
  input  logic [2:0]              head_start,
  output logic                    pop,
  output logic                    flush,
  // to / from EP-combine
  output logic                    ep_valid,
  output logic [FP_OPS-1:0][31:0] ep_ops,
  output logic [FP_OPS-1:0]       ep_pending,
  output logic                    ep_first,      // no operation of this EP issued yet
  input  logic [FP_OPS-1:0]       grant,
  output logic                    ep_done,       // EP boundary this cycle
  output logic [EPC_W-1:0]        ep_cnt,        // EPs completed so far
  // branch resolution from E1 and fetch redirect
  input  logic                    br_valid,
  input  logic [EPC_W-1:0]        br_limit,
  input  logic [13:0]             br_target,
  output logic                    redirect,
  output logic [13:0]             redirect_pc
);
  logic [2:0]        pos;
  logic              fresh;
  logic [FP_OPS-1:0] issued;
  logic [3:0]        nop_rem;
  logic              br_pend;
  logic [EPC_W-1:0]  br_lim;
  logic [13:0]       br_tgt;

  logic [2:0]        s, e;
  logic [FP_OPS-1:0] mask, nopmask;
  logic [3:0]        nop_n;
  logic              stop;

  always_comb begin
    instr_t op;
    logic   ended;
    s = fresh ? head_start : pos;
    e = 3'd7;
    mask = '0;
    nopmask = '0;
    nop_n = 4'd1;
    ended = 1'b0;
    for (int i = 0; i < FP_OPS; i++) begin
      op = instr_t'(head_fp[i]);
      if (3'(i) >= s && !ended) begin
        mask[i] = 1'b1;
        if (is_nop(op)) begin
          nopmask[i] = 1'b1;
          if (nop_count(op) > nop_n) nop_n = nop_count(op);
        end
        if (!op.p) begin
          ended = 1'b1;
          e = 3'(i);
        end
      end
    end
  end

  assign stop        = br_pend && ep_cnt == br_lim;
  assign redirect    = stop;
  assign redirect_pc = br_tgt;
  assign flush       = stop;

  assign ep_valid   = !stop && (nop_rem != 0 || head_valid);
  assign ep_ops     = head_fp;
  assign ep_pending = (ep_valid && nop_rem == 0) ? (mask & ~nopmask & ~issued) : '0;
  assign ep_first   = issued == '0;
  assign ep_done    = ep_valid && (ep_pending & ~grant) == '0;
  assign pop        = ep_done && nop_rem == 0 && e == 3'd7;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; fresh <= 1'b1; issued <= '0; nop_rem <= '0; ep_cnt <= '0;
      br_pend <= 1'b0; br_lim <= '0; br_tgt <= '0;
    end else begin
      if (br_valid) begin
        br_pend <= 1'b1;
        br_lim  <= br_limit;
        br_tgt  <= br_target;
      end
      if (stop) begin
        br_pend <= 1'b0;
        fresh   <= 1'b1;
        issued  <= '0;
        nop_rem <= '0;
      end else if (ep_done) begin
        ep_cnt <= ep_cnt + 1'b1;
        if (nop_rem != 0) begin
          nop_rem <= nop_rem - 1'b1;
        end else begin
          issued  <= '0;
          nop_rem <= nop_n - 1'b1;
          if (e == 3'd7) fresh <= 1'b1;
          else begin
            pos   <= e + 1'b1;
            fresh <= 1'b0;
          end
        end
      end else if (ep_valid) begin
        issued <= issued | (grant & ep_pending);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~ep_pending) == '0)
    else $error("dp_stage: grant for an operation that is not pending");
endmodule
