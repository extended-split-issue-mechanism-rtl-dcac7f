// Register files A and B of one thread (2 x 16 x 32-bit).
//
// Every thread has its own copy; entries are addressed as {file, index}
// (0..15 = A0..A15, 16..31 = B0..B15).  Reads are combinational and are made
// by the functional units in E1.  Writes come only from the copy-back unit's
// phase-2 commits out of the delay buffers and take effect at the clock edge,
// so an operation in E1 sees every commit of earlier EP boundaries and none of
// its own EP.  When two ports write one register in a cycle the higher port
// wins; the program is expected never to do this.  File sizes follow the
// design description; port counts and the reset to zero are this design's own.
module regfile
  import smt_vliw_pkg::*;
#(
  parameter int NR = 32,  // read ports
  parameter int NW = 18   // write ports
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][4:0]   raddr,
  output logic [NR-1:0][XLEN-1:0] rdata,
  input  logic [NW-1:0]        we,
  input  logic [NW-1:0][4:0]   waddr,
  input  logic [NW-1:0][XLEN-1:0] wdata,
  // debug write port used to preload registers (lower priority than commits)
  input  logic                 dbg_we,
  input  logic [4:0]           dbg_addr,
  input  logic [XLEN-1:0]      dbg_wdata
);
  logic [XLEN-1:0] regs [2*NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 2 * NREGS; r++) regs[r] <= '0;
    end else begin
      if (dbg_we) regs[dbg_addr] <= dbg_wdata;
      for (int w = 0; w < NW; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int r = 0; r < NR; r++) rdata[r] = regs[raddr[r]];
endmodule
