// Self-checking test of the DP stage.  Random fetch packets (random parallel
// bits, unit classes and NOP counts, random start slot) are offered; each
// cycle a random subset of the waiting operations is granted.  A model kept
// here splits packets into EPs and predicts, every cycle, the waiting-
// operation mask, the EP boundary, the packet pop, the EP count and the empty
// EPs that follow "NOP n".  A branch resolution must stop dispatch exactly
// when the EP count reaches its limit, with a redirect and a buffer flush.
module tb_dp_stage;
  import smt_vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hv, pop, flush, epv, first, done, brv, redir;
  logic [7:0][31:0] hfp, ops; logic [2:0] hst; logic [7:0] pend, grant;
  logic [7:0] cnt, brl; logic [13:0] brt, rpc;
  int checks = 0, failures = 0;
  dp_stage dut (.clk, .rst_n, .head_valid(hv), .head_fp(hfp), .head_start(hst), .pop, .flush,
    .ep_valid(epv), .ep_ops(ops), .ep_pending(pend), .ep_first(first), .grant, .ep_done(done),
    .ep_cnt(cnt), .br_valid(brv), .br_limit(brl), .br_target(brt), .redirect(redir), .redirect_pc(rpc));
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [7:0][31:0] rand_fp();
    logic [7:0][31:0] f;
    for (int i = 0; i < 8; i++) begin
      if ($urandom_range(0, 6) == 0) f[i] = op_nop($urandom_range(0, 1), 4'($urandom_range(1, 4)));
      else f[i] = op_rrr($urandom_range(0, 1), fu_class_e'($urandom_range(0, 3)), 1'($urandom), 4'd0,
                         5'($urandom), 5'($urandom), 5'($urandom));
    end
    return f;
  endfunction

  // model state
  int pos, nop_rem, m_cnt, n_eps, n_nop_eps, n_pops, n_redirect;
  logic [7:0] issued;
  bit br_pend; int br_lim; logic [13:0] br_tgt_m;

  task automatic ep_of(input logic [7:0][31:0] f, input int s, output logic [7:0] m,
                       output int e, output int nn);
    m = 0; e = 7; nn = 1;
    for (int i = s; i < 8; i++) begin
      if (!(f[i][25:24] == CL_L && f[i][22:19] == L_NOP)) m[i] = 1'b1;
      else if ((f[i][3:0] == 0 ? 1 : int'(f[i][3:0])) > nn) nn = (f[i][3:0] == 0 ? 1 : int'(f[i][3:0]));
      if (!f[i][31]) begin e = i; break; end
    end
  endtask

  initial begin
    logic [7:0] m, exp_pend; int e, nn; bit exp_done, stop;
    hv = 1; hfp = rand_fp(); hst = 3'($urandom); grant = 0; brv = 0; brl = 0; brt = 0;
    pos = int'(hst); nop_rem = 0; m_cnt = 0; issued = 0; br_pend = 0; br_lim = 0;
    n_eps = 0; n_nop_eps = 0; n_pops = 0; n_redirect = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      stop = br_pend && (m_cnt % 256) == br_lim;
      ep_of(hfp, pos, m, e, nn);
      exp_pend = (stop || nop_rem > 0) ? 8'd0 : (m & ~issued);
      grant = exp_pend & 8'($urandom);
      if ($urandom_range(0, 2) == 0) grant = exp_pend;
      brv = !br_pend && !stop && $urandom_range(0, 50) == 0;
      brt = 14'($urandom); brl = 8'(m_cnt + $urandom_range(1, 6));
      #1;
      exp_done = !stop && (exp_pend & ~grant) == 0;
      checks++;
      if (epv != !stop || pend != exp_pend || done != exp_done || cnt != 8'(m_cnt) ||
          redir != stop || flush != stop || (stop && rpc != br_tgt_m)) begin
        failures++;
        $display("FAIL cyc %0d epv=%b pend=%b/%b done=%b/%b cnt=%0d/%0d stop=%b", cyc, epv, pend, exp_pend,
                 done, exp_done, cnt, m_cnt, stop);
      end
      checks++;
      if (pop != (exp_done && nop_rem == 0 && e == 7)) begin failures++; $display("FAIL pop at %0d", cyc); end
      // advance the model
      @(posedge clk); #1;
      if (stop) begin
        br_pend = 0; issued = 0; nop_rem = 0; n_redirect++;
        hfp = rand_fp(); hst = 3'($urandom); pos = int'(hst);
      end else if (exp_done) begin
        m_cnt++; n_eps++;
        if (nop_rem > 0) begin nop_rem--; n_nop_eps++; end
        else begin
          issued = 0; nop_rem = nn - 1;
          if (e == 7) begin hfp = rand_fp(); hst = 3'($urandom); pos = int'(hst); n_pops++; end
          else pos = e + 1;
        end
      end else issued |= grant;
      if (brv) begin br_pend = 1; br_lim = int'(brl); br_tgt_m = brt; end
      @(negedge clk);
    end
    checks++;
    if (n_nop_eps == 0 || n_redirect == 0 || n_pops == 0) begin failures++; $display("FAIL coverage"); end
    $display("eps=%0d nop eps=%0d pops=%0d redirects=%0d", n_eps, n_nop_eps, n_pops, n_redirect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
