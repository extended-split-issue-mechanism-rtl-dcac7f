// Self-checking test of the M unit: random signed and unsigned 16 x 16
// products, one new operation every cycle; each result must appear exactly one
// cycle after its E1 (latency 2) with its thread and slot.
module tb_fu_mult;
  import smt_vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid; logic [1:0] th; logic [4:0] slot; logic [3:0] opc;
  logic [31:0] a, b, d; logic wv; logic [1:0] wt; logic [4:0] ws;
  int checks = 0, failures = 0;
  fu_mult dut (.clk, .rst_n, .in_valid(valid), .in_thread(th), .in_slot(slot), .in_opc(opc),
               .in_a(a), .in_b(b), .wb_valid(wv), .wb_thread(wt), .wb_slot(ws), .wb_data(d));
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [31:0] exp_d; logic exp_v; logic [4:0] exp_s;
  initial begin
    valid = 0; th = 0; slot = 0; opc = 0; a = 0; b = 0; exp_v = 0; exp_d = 0; exp_s = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      // check the operation launched in the previous cycle
      if (i > 0) begin
        checks++;
        if (wv !== exp_v || (exp_v && (d !== exp_d || ws != exp_s))) begin
          failures++; $display("FAIL i=%0d d=%h exp=%h", i, d, exp_d);
        end
      end
      valid = ($urandom_range(0, 3) != 0); th = 2'($urandom); slot = 5'($urandom);
      opc = ($urandom_range(0, 1) != 0) ? M_MPYU : M_MPY; a = $urandom; b = $urandom;
      exp_v = valid; exp_s = slot;
      exp_d = (opc == M_MPYU) ? 32'(a[15:0]) * 32'(b[15:0])
                              : 32'($signed(a[15:0]) * $signed(b[15:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
