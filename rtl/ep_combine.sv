// EP-combine stage: the extended split-issue logic shared by all threads.
//
// Every cycle each thread's DP stage offers the not-yet-issued operations of
// its current execute packet (EP).  Threads are served in fixed priority order,
// thread 0 first.  For each waiting operation the stage looks for a free
// hardware unit of the operation's class; if it finds one the operation is
// granted and sent to that unit, otherwise it waits for a later cycle.  So an
// EP may be issued over several cycles and in any order, but a thread never
// issues from more than one EP in a cycle; a thread's EP is complete (an EP
// boundary) in the cycle its last operations are granted.  Thread 0 sees all
// units free and therefore issues exactly as a single-threaded VLIW would.
//
// Hardware/ISA decoupling: the number of L, S, M and D units is set by
// parameters.  With two units of a class (the ISA's count), an operation goes
// to the unit its encoding names (side 1 or 2).  With any other count, the
// unit is multiplexed to both register files: the operation tries the unit of
// its side first, then any other free unit of the class, so with one
// multiplier two multiplies of one EP issue in successive cycles.
//
// Granted operations and the per-thread boundary flags are registered and go
// to the DC stage next cycle.  Fixed priority, split issue and unit
// multiplexing follow the design description; the unit-choice order is this
// design's own.
module ep_combine
  import smt_vliw_pkg::*;
#(
  parameter int NT = 4,
  parameter int NL = 2,
  parameter int NS = 2,
  parameter int NM = 2,
  parameter int ND = 2,
  localparam int NFU = NL + NS + NM + ND
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NT-1:0]                      ep_valid,
  input  logic [NT-1:0][FP_OPS-1:0][31:0]    ep_ops,
  input  logic [NT-1:0][FP_OPS-1:0]          ep_pending,
  output logic [NT-1:0][FP_OPS-1:0]          grant,
  output logic [NT-1:0]                      boundary,      // this cycle
  // registered towards DC
  output logic [NFU-1:0]                     iss_valid,
  output logic [NFU-1:0][1:0]                iss_thread,
  output logic [NFU-1:0][31:0]               iss_op,
  output logic [NT-1:0]                      iss_boundary,
  // observation, this cycle
  output logic [$clog2(NFU+1)-1:0]           n_granted,
  output logic                               any_moved      // op sent to a unit other than its ISA unit
);
  // Class of each unit and its index within the class, fixed at elaboration.
  function automatic logic [NFU-1:0][1:0] unit_classes();
    logic [NFU-1:0][1:0] r;
    for (int u = 0; u < NFU; u++) r[u] = unit_class(u, NL, NS, NM, ND);
    return r;
  endfunction
  function automatic logic [NFU-1:0][1:0] unit_indices();
    logic [NFU-1:0][1:0] r;
    for (int u = 0; u < NFU; u++) r[u] = 2'(u - class_first(unit_class(u, NL, NS, NM, ND), NL, NS, NM, ND));
    return r;
  endfunction
  localparam logic [NFU-1:0][1:0] UCLS = unit_classes();
  localparam logic [NFU-1:0][1:0] UIDX = unit_indices();
  localparam logic [3:0] TWO = {ND == 2, NM == 2, NS == 2, NL == 2};  // class has exactly 2 units
  localparam logic [3:0] MANY = {ND > 1, NM > 1, NS > 1, NL > 1};

  logic [NFU-1:0]          busy;
  logic [NFU-1:0]          g_valid;
  logic [NFU-1:0][1:0]     g_thread;
  logic [NFU-1:0][31:0]    g_op;

  always_comb begin
    instr_t         op;
    logic [NFU-1:0] sel;
    logic [1:0]     pidx;
    logic           found;
    op = '0;
    sel = '0;
    pidx = '0;
    found = 1'b0;
    boundary = '0;
    busy = '0;
    g_valid = '0;
    g_thread = '0;
    g_op = '0;
    grant = '0;
    n_granted = '0;
    any_moved = 1'b0;
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < FP_OPS; i++) begin
        op    = instr_t'(ep_ops[t][i]);
        sel   = '0;
        found = 1'b0;
        if (ep_valid[t] && ep_pending[t][i]) begin
          // the unit the operation's side names (unit 1 of the class if it has only one)
          pidx = (op.side && MANY[op.cls]) ? 2'd1 : 2'd0;
          for (int u = 0; u < NFU; u++)
            if (UCLS[u] == op.cls && UIDX[u] == pidx && !busy[u]) begin
              sel[u] = 1'b1;
              found  = 1'b1;
            end
          // otherwise, with a unit count other than two, any free unit of the class
          if (!found && !TWO[op.cls])
            for (int u = 0; u < NFU; u++)
              if (!found && UCLS[u] == op.cls && !busy[u]) begin
                sel[u] = 1'b1;
                found  = 1'b1;
              end
        end
        if (found) begin
          grant[t][i] = 1'b1;
          n_granted   = n_granted + 1'b1;
        end
        for (int u = 0; u < NFU; u++)
          if (sel[u]) begin
            busy[u]     = 1'b1;
            g_valid[u]  = 1'b1;
            g_thread[u] = 2'(t);
            g_op[u]     = ep_ops[t][i];
            if (UIDX[u] != {1'b0, op.side}) any_moved = 1'b1;
          end
      end
    end
    for (int t = 0; t < NT; t++)
      boundary[t] = ep_valid[t] && (ep_pending[t] & ~grant[t]) == '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_valid <= '0; iss_thread <= '0; iss_op <= '0; iss_boundary <= '0;
    end else begin
      iss_valid    <= g_valid;
      iss_thread   <= g_thread;
      iss_op       <= g_op;
      iss_boundary <= boundary;
    end
  end
endmodule
