// Copy-back unit: schedules the phase-2 commits of every thread.
//
// For each thread it counts the EP-boundary signals that the DC stage passes
// on, aligned with the cycle in which the EP's last operations are in E1.  The
// count is the number of the EP now in E1; an operation issued in EP k with
// latency L gets the commit tag k + L - 1, i.e. its result is copied from the
// delay buffer into the register file at the end of the cycle of the
// (L-1)-th boundary after its own EP's (the boundary of its own EP for L = 1).
// The unit hands each functional unit the tag for the operation it has in
// E1.  On each boundary the unit tells the thread's delay buffer to commit all
// entries holding the current count and then advances it.  The commit rule,
// N EP boundaries for an operation of latency N+1, follows the design
// description; the tag arithmetic is this design's own.
module copyback_unit
  import smt_vliw_pkg::*;
#(
  parameter int NT = 4,
  parameter int NL = 2,
  parameter int NS = 2,
  parameter int NM = 2,
  parameter int ND = 2,
  localparam int NFU = NL + NS + NM + ND
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NT-1:0]              boundary,      // EP boundary reaching E1
  output logic [NT-1:0][EPC_W-1:0]   cur_ep,        // EP number of operations now in E1
  output logic [NT-1:0]              commit_en,
  output logic [NT-1:0][EPC_W-1:0]   commit_tag,
  // commit tag for the operation each unit has in E1
  input  logic [NFU-1:0][1:0]        unit_thread,
  output logic [NFU-1:0][EPC_W-1:0]  alloc_tag
);
  always_comb
    for (int u = 0; u < NFU; u++)
      alloc_tag[u] = cur_ep[unit_thread[u]] +
                     EPC_W'(class_lat(unit_class(u, NL, NS, NM, ND)) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur_ep <= '0;
    else
      for (int t = 0; t < NT; t++)
        if (boundary[t]) cur_ep[t] <= cur_ep[t] + 1'b1;
  end

  assign commit_en  = boundary;
  assign commit_tag = cur_ep;
endmodule
