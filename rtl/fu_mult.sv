// M unit: 16 x 16 multiplier with a two-cycle latency (E1, E2).
//
// The product of the low halves of the operands (signed for MPY, unsigned for
// MPYU) is formed in E1 and registered; in E2 it leaves with the thread number
// and delay-buffer slot and is written into that slot at the end of E2.  The
// unit is fully pipelined and accepts one operation per cycle from any thread.
// The 16-bit multiplier and the 2-cycle latency follow the design description;
// the opcodes are this design's own.
module fu_mult
  import smt_vliw_pkg::*;
#(
  parameter int SLOT_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,   // E1
  input  logic [1:0]        in_thread,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [3:0]        in_opc,
  input  logic [XLEN-1:0]   in_a,
  input  logic [XLEN-1:0]   in_b,
  output logic              wb_valid,   // E2
  output logic [1:0]        wb_thread,
  output logic [SLOT_W-1:0] wb_slot,
  output logic [XLEN-1:0]   wb_data
);
  logic [XLEN-1:0] prod;

  always_comb begin
    if (in_opc == M_MPYU) prod = XLEN'(in_a[15:0]) * XLEN'(in_b[15:0]);
    else prod = $unsigned(XLEN'($signed(in_a[15:0])) * XLEN'($signed(in_b[15:0])));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid  <= 1'b0;
      wb_thread <= '0;
      wb_slot   <= '0;
      wb_data   <= '0;
    end else begin
      wb_valid  <= in_valid;
      wb_thread <= in_thread;
      wb_slot   <= in_slot;
      wb_data   <= prod;
    end
  end
endmodule
