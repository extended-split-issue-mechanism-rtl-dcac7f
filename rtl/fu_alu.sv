// L unit: 32-bit integer ALU with a latency of one cycle.
//
// The L unit executes additions, subtractions, logic operations and compares.
// Operands arrive in E1 (read from the issuing thread's register file that same
// cycle); the result leaves combinationally in E1 together with the thread
// number and the delay-buffer slot it was allocated, and is written into that
// slot at the end of E1.  Latency 1 and the unit's role follow the design
// description; the description gives a 40-bit ALU, this design keeps all
// registers and units at 32 bits, and the opcode set is this design's own.
module fu_alu
  import smt_vliw_pkg::*;
#(
  parameter int SLOT_W = 5
) (
  input  logic              in_valid,   // E1: operation executes and writes a register
  input  logic [1:0]        in_thread,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [3:0]        in_opc,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  output logic              wb_valid,
  output logic [1:0]        wb_thread,
  output logic [SLOT_W-1:0] wb_slot,
  output logic [XLEN-1:0]   wb_data
);
  always_comb begin
    unique case (in_opc)
      L_ADD:   wb_data = in_a + in_b;
      L_SUB:   wb_data = in_a - in_b;
      L_AND:   wb_data = in_a & in_b;
      L_OR:    wb_data = in_a | in_b;
      L_XOR:   wb_data = in_a ^ in_b;
      L_CMPEQ: wb_data = {31'd0, in_a == in_b};
      L_CMPGT: wb_data = {31'd0, $signed(in_a) > $signed(in_b)};
      L_CMPLT: wb_data = {31'd0, $signed(in_a) < $signed(in_b)};
      default: wb_data = '0;
    endcase
  end
  assign wb_valid  = in_valid;
  assign wb_thread = in_thread;
  assign wb_slot   = in_slot;
endmodule
