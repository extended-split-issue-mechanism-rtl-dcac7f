// Self-checking test of the program memory: words are loaded one at a time
// and whole fetch packets are read back one cycle after the request.
module tb_program_memory;
  import smt_vliw_pkg::*;
  localparam int FPAW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re; logic [FPAW-1:0] raddr; logic [7:0][31:0] rdata;
  logic lwe; logic [FPAW+2:0] la; logic [31:0] ld;
  logic [31:0] model [2**(FPAW+3)];
  int checks = 0, failures = 0;
  program_memory #(.FPAW(FPAW)) dut (.clk, .re, .raddr, .rdata, .load_we(lwe), .load_addr(la), .load_data(ld));
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    re = 0; raddr = 0; lwe = 0; la = 0; ld = 0;
    for (int i = 0; i < 2**(FPAW+3); i++) begin
      @(negedge clk); lwe = 1; la = (FPAW+3)'(i); ld = $urandom; model[i] = ld;
    end
    @(negedge clk); lwe = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); re = 1; raddr = FPAW'($urandom);
      @(negedge clk); re = 0;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rdata[k] !== model[{raddr, 3'(k)}]) begin failures++; $display("FAIL fp %0d op %0d", raddr, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
