// S unit: 32-bit shifter/ALU with a latency of one cycle; also resolves branches.
//
// Shifts, add/subtract and constant moves (MVK, whose sign-extended 14-bit
// constant arrives as operand b) produce a result combinationally in E1 that
// is written to the allocated delay-buffer slot at the end of E1.  A branch
// (B) produces no register result: in E1 it reports the taken branch, its
// thread and its absolute word target, and the dispatch logic of that thread
// redirects fetch after the branch's delay slots.  That branches are resolved
// in E1 of an S unit follows the design description; the 32-bit width and the
// opcode set are this design's own.
module fu_shift
  import smt_vliw_pkg::*;
#(
  parameter int SLOT_W = 5
) (
  input  logic              in_valid,   // E1: operation executes (predicate true)
  input  logic [1:0]        in_thread,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [3:0]        in_opc,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  output logic              wb_valid,
  output logic [1:0]        wb_thread,
  output logic [SLOT_W-1:0] wb_slot,
  output logic [XLEN-1:0]   wb_data,
  output logic              br_valid,
  output logic [1:0]        br_thread,
  output logic [13:0]       br_target
);
  always_comb begin
    unique case (in_opc)
      S_ADD:   wb_data = in_a + in_b;
      S_SUB:   wb_data = in_a - in_b;
      S_SHL:   wb_data = in_a << in_b[4:0];
      S_SHRU:  wb_data = in_a >> in_b[4:0];
      S_SHRA:  wb_data = $unsigned($signed(in_a) >>> in_b[4:0]);
      S_MVK:   wb_data = in_b;
      default: wb_data = '0;
    endcase
  end
  assign wb_valid  = in_valid && in_opc != S_B;
  assign wb_thread = in_thread;
  assign wb_slot   = in_slot;
  assign br_valid  = in_valid && in_opc == S_B;
  assign br_thread = in_thread;
  assign br_target = in_b[13:0];
endmodule
