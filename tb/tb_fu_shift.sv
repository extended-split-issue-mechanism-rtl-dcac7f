// Self-checking test of the S unit: shifts, add/subtract and MVK against values
// computed here, with the result in the same cycle; a branch must raise
// br_valid with its target and write no result.
module tb_fu_shift;
  import smt_vliw_pkg::*;
  logic valid; logic [1:0] th; logic [4:0] slot; logic [3:0] opc;
  logic [31:0] a, b, d; logic wv; logic [1:0] wt; logic [4:0] ws;
  logic bv; logic [1:0] bt; logic [13:0] btg;
  int checks = 0, failures = 0;
  fu_shift dut (.in_valid(valid), .in_thread(th), .in_slot(slot), .in_opc(opc), .in_a(a), .in_b(b),
                .wb_valid(wv), .wb_thread(wt), .wb_slot(ws), .wb_data(d),
                .br_valid(bv), .br_thread(bt), .br_target(btg));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [31:0] ref_s(logic [3:0] o, logic [31:0] x, logic [31:0] y);
    case (o)
      S_ADD: return x + y;
      S_SUB: return x - y;
      S_SHL: return x << y[4:0];
      S_SHRU: return x >> y[4:0];
      S_SHRA: return $unsigned($signed(x) >>> y[4:0]);
      S_MVK: return y;
      default: return 0;
    endcase
  endfunction
  initial begin
    logic [3:0] ops [6] = '{S_ADD, S_SUB, S_SHL, S_SHRU, S_SHRA, S_MVK};
    for (int i = 0; i < 300; i++) begin
      valid = 1'b1; th = 2'($urandom); slot = 5'($urandom);
      opc = ops[$urandom_range(0, 5)]; a = $urandom; b = $urandom;
      #1;
      checks++;
      if (d !== ref_s(opc, a, b) || !wv || bv || ws != slot || wt != th) begin
        failures++; $display("FAIL opc=%0d a=%h b=%h d=%h", opc, a, b, d);
      end
    end
    for (int i = 0; i < 20; i++) begin
      valid = 1'b1; th = 2'(i); opc = S_B; b = 32'($urandom_range(0, 16383));
      #1;
      checks++;
      if (!bv || wv || btg != b[13:0] || bt != th) begin failures++; $display("FAIL branch"); end
    end
    valid = 1'b0; #1; checks++;
    if (bv || wv) begin failures++; $display("FAIL idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
