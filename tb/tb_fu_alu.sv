// Self-checking test of the L unit: random operands for every opcode, results
// compared with values computed here; the result must appear in the same
// cycle (latency 1) with the thread and slot passed through.
module tb_fu_alu;
  import smt_vliw_pkg::*;
  logic valid; logic [1:0] th; logic [4:0] slot; logic [3:0] opc;
  logic [31:0] a, b, d; logic wv; logic [1:0] wt; logic [4:0] ws;
  int checks = 0, failures = 0;
  fu_alu dut (.in_valid(valid), .in_thread(th), .in_slot(slot), .in_opc(opc), .in_a(a), .in_b(b),
              .wb_valid(wv), .wb_thread(wt), .wb_slot(ws), .wb_data(d));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [31:0] ref_alu(logic [3:0] o, logic [31:0] x, logic [31:0] y);
    case (o)
      L_ADD: return x + y;
      L_SUB: return x - y;
      L_AND: return x & y;
      L_OR:  return x | y;
      L_XOR: return x ^ y;
      L_CMPEQ: return (x == y) ? 1 : 0;
      L_CMPGT: return ($signed(x) > $signed(y)) ? 1 : 0;
      L_CMPLT: return ($signed(x) < $signed(y)) ? 1 : 0;
      default: return 0;
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 400; i++) begin
      valid = 1'b1; th = 2'($urandom); slot = 5'($urandom);
      opc = 4'($urandom_range(0, 7)); a = $urandom; b = (i % 5 == 0) ? a : $urandom;
      #1;
      checks++;
      if (d !== ref_alu(opc, a, b) || !wv || wt != th || ws != slot) begin
        failures++; $display("FAIL opc=%0d a=%h b=%h d=%h", opc, a, b, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
