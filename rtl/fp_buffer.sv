// PR-stage fetch-packet buffer of one thread.
//
// A small FIFO of fetch packets, each with the slot at which dispatch starts
// (non-zero only for the first packet after a branch into the middle of a
// packet).  The fetch unit pushes packets arriving in PR; the thread's DP stage
// reads the head and pops it once all its execute packets have been
// dispatched.  A branch flushes the buffer.  count reports the occupancy so
// that fetch never requests more packets than fit.  Four entries per thread
// follow the fetch description; the FIFO organisation is this design's own.
module fp_buffer
  import smt_vliw_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic                    push,
  input  logic [FP_OPS-1:0][31:0] push_fp,
  input  logic [2:0]              push_start,
  input  logic                    pop,
  output logic                    head_valid,
  output logic [FP_OPS-1:0][31:0] head_fp,
  output logic [2:0]              head_start,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [FP_OPS-1:0][31:0] fps    [DEPTH];
  logic [2:0]              starts [DEPTH];
  logic [PW-1:0]           rd, wr;

  assign head_valid = count != 0;
  assign head_fp    = fps[rd];
  assign head_start = starts[rd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        fps[i] <= '0;
        starts[i] <= '0;
      end
    end else if (flush) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (push) begin
        fps[wr]    <= push_fp;
        starts[wr] <= push_start;
        wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (pop) rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  // rules of the FIFO handshake
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && !head_valid))
    else $error("fp_buffer: pop of an empty buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && !pop && count == DEPTH))
    else $error("fp_buffer: push into a full buffer");
endmodule
