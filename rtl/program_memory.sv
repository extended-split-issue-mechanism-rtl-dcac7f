// Program memory: one fetch packet (8 x 32-bit operations) per row.
//
// The fetch unit presents a fetch-packet address in its PW stage and receives
// the whole packet in PR, one cycle later (synchronous read).  A 32-bit load
// port writes single operation words, used to place programs before a run.
// The fetch packet of 8 operations follows the design description; the size
// (64 KB = 2048 packets, as in the TMS320C6201) is this design's own choice.
module program_memory
  import smt_vliw_pkg::*;
#(
  parameter int FPAW = 11     // fetch-packet address width
) (
  input  logic                      clk,
  input  logic                      re,
  input  logic [FPAW-1:0]           raddr,
  output logic [FP_OPS-1:0][31:0]   rdata,
  input  logic                      load_we,
  input  logic [FPAW+2:0]           load_addr,   // word address
  input  logic [31:0]               load_data
);
  logic [FP_OPS-1:0][31:0] mem [2**FPAW];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (load_we) mem[load_addr[FPAW+2:3]][load_addr[2:0]] <= load_data;
  end
endmodule
