// D unit: load/store unit with a five-cycle load latency (E1 .. E5).
//
// In E1 the word address a + b is formed.  A store (STW) writes its data word
// to the data memory at the end of E1 and produces no register result.  A load
// (LDW) sends the address to the synchronous data memory in E1, takes the read
// word in E2 and carries it through E3 and E4; in E5 the word leaves with the
// thread number and delay-buffer slot and is written into that slot at the end
// of E5.  The unit accepts one operation per cycle.  The 5-cycle latency follows
// the design description; word addressing and the store timing are this
// design's own choices.
module fu_ldst
  import smt_vliw_pkg::*;
#(
  parameter int SLOT_W = 5,
  parameter int AW     = 14       // data memory word-address width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,   // E1: operation executes (predicate true)
  input  logic [1:0]        in_thread,
  input  logic [SLOT_W-1:0] in_slot,
  input  logic [3:0]        in_opc,
  input  logic [XLEN-1:0]   in_a,       // base
  input  logic [XLEN-1:0]   in_b,       // offset
  input  logic [XLEN-1:0]   in_sd,      // store data
  // data memory port
  output logic              mem_re,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [XLEN-1:0]   mem_wdata,
  input  logic [XLEN-1:0]   mem_rdata,  // one cycle after mem_re
  output logic              wb_valid,   // E5
  output logic [1:0]        wb_thread,
  output logic [SLOT_W-1:0] wb_slot,
  output logic [XLEN-1:0]   wb_data
);
  typedef struct packed {
    logic              valid;
    logic [1:0]        thread;
    logic [SLOT_W-1:0] slot;
  } tag_t;

  logic [XLEN-1:0] addr_full;
  tag_t            e2, e3, e4, e5;
  logic [XLEN-1:0] d3, d4, d5;

  assign addr_full = in_a + in_b;
  assign mem_addr  = addr_full[AW-1:0];
  assign mem_re    = in_valid && in_opc == D_LDW;
  assign mem_we    = in_valid && in_opc == D_STW;
  assign mem_wdata = in_sd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2 <= '0; e3 <= '0; e4 <= '0; e5 <= '0;
      d3 <= '0; d4 <= '0; d5 <= '0;
    end else begin
      e2 <= '{valid: mem_re, thread: in_thread, slot: in_slot};
      e3 <= e2;
      d3 <= mem_rdata;
      e4 <= e3;
      d4 <= d3;
      e5 <= e4;
      d5 <= d4;
    end
  end

  assign wb_valid  = e5.valid;
  assign wb_thread = e5.thread;
  assign wb_slot   = e5.slot;
  assign wb_data   = d5;
endmodule
