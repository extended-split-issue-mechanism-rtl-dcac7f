// Data memory shared by all threads, with one port per D unit plus a debug port.
//
// Word-addressed, 32-bit words.  Each D-unit port can read (data valid the
// cycle after the request) and write (at the clock edge) once per cycle; when
// several ports write one word in a cycle, the higher port wins.  The debug port
// lets a test bench preload and inspect memory; its read is combinational.
// The design description only names on-chip memory; its size (64 KB, as in
// the TMS320C6201) and the port arrangement are this design's own.
module data_memory
  import smt_vliw_pkg::*;
#(
  parameter int NP = 2,      // D-unit ports
  parameter int AW = 14      // 2^14 words = 64 KB
) (
  input  logic                    clk,
  input  logic [NP-1:0]           re,
  input  logic [NP-1:0]           we,
  input  logic [NP-1:0][AW-1:0]   addr,
  input  logic [NP-1:0][XLEN-1:0] wdata,
  output logic [NP-1:0][XLEN-1:0] rdata,
  input  logic                    dbg_we,
  input  logic [AW-1:0]           dbg_addr,
  input  logic [XLEN-1:0]         dbg_wdata,
  output logic [XLEN-1:0]         dbg_rdata
);
  logic [XLEN-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (re[p]) rdata[p] <= mem[addr[p]];
      if (we[p]) mem[addr[p]] <= wdata[p];
    end
    if (dbg_we) mem[dbg_addr] <= dbg_wdata;
  end

  assign dbg_rdata = mem[dbg_addr];
endmodule
