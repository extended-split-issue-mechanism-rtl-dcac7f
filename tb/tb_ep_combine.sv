// Self-checking test of the EP-combine stage in two unit configurations: the
// ISA's 2 L, 2 S, 2 M, 2 D units and a decoupled 3 L, 3 S, 1 M, 2 D.  Random
// waiting-operation masks over random operations of four threads are offered
// every cycle.  A reference allocator written here (fixed thread priority,
// operations in slot order, the unit of the operation's side first, any free
// unit of the class when the class count differs from two) predicts the
// grants, the EP boundaries, the number of grants and the "moved" flag, and
// the unit each operation lands on, which is checked on the registered outputs
// one cycle later.
module tb_ep_combine;
  import smt_vliw_pkg::*;
  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [NT-1:0] ev;
  logic [NT-1:0][7:0][31:0] eo;
  logic [NT-1:0][7:0] ep;

  // configuration A: 2/2/2/2
  logic [NT-1:0][7:0] ga; logic [NT-1:0] ba; logic [7:0] iva; logic [7:0][1:0] ita;
  logic [7:0][31:0] ioa; logic [NT-1:0] iba; logic [3:0] nga; logic mva;
  ep_combine #(.NT(NT)) dut_a (.clk, .rst_n, .ep_valid(ev), .ep_ops(eo), .ep_pending(ep),
    .grant(ga), .boundary(ba), .iss_valid(iva), .iss_thread(ita), .iss_op(ioa), .iss_boundary(iba),
    .n_granted(nga), .any_moved(mva));
  // configuration B: 3/3/1/2
  logic [NT-1:0][7:0] gb; logic [NT-1:0] bb; logic [8:0] ivb; logic [8:0][1:0] itb;
  logic [8:0][31:0] iob; logic [NT-1:0] ibb; logic [3:0] ngb; logic mvb;
  ep_combine #(.NT(NT), .NL(3), .NS(3), .NM(1), .ND(2)) dut_b (.clk, .rst_n, .ep_valid(ev),
    .ep_ops(eo), .ep_pending(ep), .grant(gb), .boundary(bb), .iss_valid(ivb), .iss_thread(itb),
    .iss_op(iob), .iss_boundary(ibb), .n_granted(ngb), .any_moved(mvb));

  typedef struct {
    logic [NT-1:0][7:0] grant;
    logic [NT-1:0]      bnd;
    int                 n;
    bit                 moved;
    bit                 uv[9];
    logic [1:0]         ut[9];
    logic [31:0]        uo[9];
  } res_t;

  function automatic res_t reference(int nl, int ns, int nm, int nd);
    res_t r;
    int cnt[4], first[4];
    cnt = '{nl, ns, nm, nd};
    first = '{0, nl, nl + ns, nl + ns + nm};
    r.grant = '0; r.bnd = '0; r.n = 0; r.moved = 0;
    for (int u = 0; u < 9; u++) begin r.uv[u] = 0; r.ut[u] = 0; r.uo[u] = 0; end
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < 8; i++) begin
        if (ev[t] && ep[t][i]) begin
          int c, pref, pick;
          c = int'(eo[t][i][25:24]);
          pref = first[c] + ((eo[t][i][23] && cnt[c] > 1) ? 1 : 0);
          pick = -1;
          if (!r.uv[pref]) pick = pref;
          else if (cnt[c] != 2)
            for (int k = first[c]; k < first[c] + cnt[c]; k++)
              if (pick < 0 && !r.uv[k]) pick = k;
          if (pick >= 0) begin
            r.uv[pick] = 1; r.ut[pick] = 2'(t); r.uo[pick] = eo[t][i];
            r.grant[t][i] = 1; r.n++;
            if (pick != first[c] + (eo[t][i][23] ? 1 : 0)) r.moved = 1;
          end
        end
      end
      r.bnd[t] = ev[t] && (ep[t] & ~r.grant[t]) == 0;
    end
    return r;
  endfunction

  initial begin
    res_t ra, rb, pa, pb;
    int moved_b = 0, splits = 0;
    bit have_prev = 0;
    ev = 0; eo = 0; ep = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int t = 0; t < NT; t++) begin
        ev[t] = $urandom_range(0, 4) != 0;
        ep[t] = 8'($urandom) & (ev[t] ? 8'hff : 8'h00);
        for (int i = 0; i < 8; i++)
          eo[t][i] = op_rrr(1'b0, fu_class_e'($urandom_range(0, 3)), 1'($urandom), 4'($urandom_range(0, 7)),
                            5'($urandom), 5'($urandom), 5'($urandom));
      end
      #1;
      ra = reference(2, 2, 2, 2);
      rb = reference(3, 3, 1, 2);
      checks++;
      if (ga != ra.grant || ba != ra.bnd || int'(nga) != ra.n || mva != ra.moved) begin
        failures++; $display("FAIL A cyc %0d grant %h/%h", cyc, ga, ra.grant);
      end
      checks++;
      if (gb != rb.grant || bb != rb.bnd || int'(ngb) != rb.n || mvb != rb.moved) begin
        failures++; $display("FAIL B cyc %0d grant %h/%h", cyc, gb, rb.grant);
      end
      if (have_prev) begin
        for (int u = 0; u < 8; u++) begin
          checks++;
          if (iva[u] != pa.uv[u] || (pa.uv[u] && (ita[u] != pa.ut[u] || ioa[u] != pa.uo[u]))) begin
            failures++; $display("FAIL A unit %0d cyc %0d", u, cyc);
          end
        end
        for (int u = 0; u < 9; u++) begin
          checks++;
          if (ivb[u] != pb.uv[u] || (pb.uv[u] && (itb[u] != pb.ut[u] || iob[u] != pb.uo[u]))) begin
            failures++; $display("FAIL B unit %0d cyc %0d", u, cyc);
          end
        end
        checks++;
        if (iba != pa.bnd || ibb != pb.bnd) begin failures++; $display("FAIL iss_boundary cyc %0d", cyc); end
      end
      if (rb.moved) moved_b++;
      for (int t = 0; t < NT; t++) if (ev[t] && ep[t] != 0 && !ra.bnd[t]) splits++;
      pa = ra; pb = rb; have_prev = 1;
      @(posedge clk); #1;
      @(negedge clk);
    end
    checks++;
    if (moved_b == 0 || splits == 0) begin failures++; $display("FAIL coverage"); end
    $display("moved(B)=%0d split EPs(A)=%0d", moved_b, splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
