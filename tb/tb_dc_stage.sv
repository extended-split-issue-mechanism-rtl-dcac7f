// Self-checking test of the DC stage: random operation words on every unit
// input are decoded by a reference written here from the bit layout of the
// operation word, and the registered commands and EP-boundary flags are
// checked one cycle later.
module tb_dc_stage;
  import smt_vliw_pkg::*;
  localparam int NT = 4, NFU = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [NFU-1:0] iv; logic [NFU-1:0][1:0] it; logic [NFU-1:0][31:0] io; logic [NT-1:0] ib, eb;
  fu_cmd_t [NFU-1:0] cmd;
  dc_stage #(.NT(NT), .NFU(NFU)) dut (.clk, .rst_n, .iss_valid(iv), .iss_thread(it), .iss_op(io),
    .iss_boundary(ib), .e1_cmd(cmd), .e1_boundary(eb));

  function automatic fu_cmd_t ref_dec(logic v, logic [1:0] t, logic [31:0] w);
    fu_cmd_t c;
    bit k14;
    k14 = w[25:24] == 2'd1 && (w[22:19] == 4'd5 || w[22:19] == 4'd7);
    c.valid = v; c.thread = t; c.cls = fu_class_e'(w[25:24]); c.opc = w[22:19];
    c.dst = w[18:14]; c.src1 = w[13:9]; c.src2 = w[7:3];
    c.use_imm = k14 ? 1'b1 : w[8];
    c.imm = k14 ? {{18{w[13]}}, w[13:0]} : {{24{w[7]}}, w[7:0]};
    c.pred_en = w[30]; c.pred_z = w[29]; c.pred_reg = {w[28], 2'b00, w[27:26]};
    c.writes_reg = !((w[25:24] == 2'd1 && w[22:19] == 4'd7) || (w[25:24] == 2'd3 && w[22:19] == 4'd1));
    return c;
  endfunction

  initial begin
    fu_cmd_t exp_c[NFU]; logic [NT-1:0] exp_b;
    int n_branch = 0, n_store = 0;
    iv = 0; it = 0; io = 0; ib = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      iv = 8'($urandom); ib = 4'($urandom);
      for (int u = 0; u < NFU; u++) begin
        it[u] = 2'($urandom); io[u] = $urandom;
        if ($urandom_range(0, 3) == 0) io[u][25:19] = {2'd1, 1'($urandom), 4'd7};  // B
        if ($urandom_range(0, 3) == 0) io[u][25:19] = {2'd3, 1'($urandom), 4'd1};  // STW
        exp_c[u] = ref_dec(iv[u], it[u], io[u]);
        if (io[u][25:24] == 2'd1 && io[u][22:19] == 4'd7) n_branch++;
        if (io[u][25:24] == 2'd3 && io[u][22:19] == 4'd1) n_store++;
      end
      exp_b = ib;
      @(posedge clk); #1;
      for (int u = 0; u < NFU; u++) begin
        checks++;
        if (cmd[u] != exp_c[u]) begin
          failures++; $display("FAIL cyc %0d unit %0d op %h: %p vs %p", cyc, u, io[u], cmd[u], exp_c[u]);
        end
      end
      checks++;
      if (eb != exp_b) begin failures++; $display("FAIL boundary cyc %0d", cyc); end
      @(negedge clk);
    end
    $display("branches=%0d stores=%0d", n_branch, n_store);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
