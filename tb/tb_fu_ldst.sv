// Self-checking test of the D unit against a memory model kept here: random
// stores and loads, one per cycle.  A store must reach the memory port in E1;
// a load's word must come back exactly four cycles after E1 (latency 5) with
// its thread and slot.
module tb_fu_ldst;
  import smt_vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid; logic [1:0] th; logic [4:0] slot; logic [3:0] opc;
  logic [31:0] a, b, sd, d, mwd, mrd; logic mre, mwe; logic [7:0] maddr;
  logic wv; logic [1:0] wt; logic [4:0] ws;
  logic [31:0] mem [256];
  int checks = 0, failures = 0;
  fu_ldst #(.AW(8)) dut (.clk, .rst_n, .in_valid(valid), .in_thread(th), .in_slot(slot), .in_opc(opc),
     .in_a(a), .in_b(b), .in_sd(sd), .mem_re(mre), .mem_we(mwe), .mem_addr(maddr), .mem_wdata(mwd),
     .mem_rdata(mrd), .wb_valid(wv), .wb_thread(wt), .wb_slot(ws), .wb_data(d));
  // synchronous memory model
  always @(posedge clk) begin
    if (mre) mrd <= mem[maddr];
    if (mwe) mem[maddr] <= mwd;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [31:0] shadow [256];
  logic        ev [0:4]; logic [31:0] ed [0:4]; logic [4:0] es [0:4];
  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = 32'(i * 3); shadow[i] = 32'(i * 3); end
    valid = 0; th = 0; slot = 0; opc = 0; a = 0; b = 0; sd = 0; mrd = 0;
    for (int k = 0; k < 5; k++) begin ev[k] = 0; ed[k] = 0; es[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // the operation that entered E1 four cycles ago is in E5 now
      checks++;
      if (wv !== ev[3] || (ev[3] && (d !== ed[3] || ws != es[3]))) begin
        failures++; $display("FAIL cycle %0d wv=%b d=%h exp=%h", i, wv, d, ed[3]);
      end
      for (int k = 3; k > 0; k--) begin ev[k] = ev[k-1]; ed[k] = ed[k-1]; es[k] = es[k-1]; end
      valid = ($urandom_range(0, 3) != 0); th = 2'($urandom); slot = 5'($urandom);
      opc = ($urandom_range(0, 2) == 0) ? D_STW : D_LDW;
      a = 32'($urandom_range(0, 200)); b = 32'($urandom_range(0, 55)); sd = $urandom;
      ev[0] = valid && opc == D_LDW; es[0] = slot; ed[0] = shadow[8'(a + b)];
      if (valid && opc == D_STW) shadow[8'(a + b)] = sd;
      #1;
      checks++;
      if (mwe !== (valid && opc == D_STW) || (mwe && (maddr != 8'(a + b) || mwd != sd))) begin
        failures++; $display("FAIL store port");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
