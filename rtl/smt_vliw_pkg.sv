// Shared types, constants and helper functions of the SMT VLIW DSP.
//
// The machine is a TMS320C6201-style clustered VLIW: two register files (A and
// B, 16 x 32-bit each), four functional-unit classes (L = ALU, S = shifter/ALU
// with branches, M = 16x16 multiplier, D = load/store) with latencies 1, 1, 2
// and 5, eight 32-bit operations per fetch packet, and execute packets (EPs)
// chained by a per-operation "parallel" bit.  Those numbers follow the design
// description.  The 32-bit operation encoding below is this design's own: the
// description gives no encoding, so a compact one covering a small ISA subset
// is defined here.
//
// Operation word (instr_t):
//   [31]    p         1: next operation belongs to the same EP
//   [30]    pred_en   operation is predicated
//   [29]    pred_z    1: execute when predicate register is zero, 0: non-zero
//   [28]    pred_side predicate register file (0 = A, 1 = B)
//   [27:26] pred_reg  predicate register 0..3
//   [25:24] cls       unit class (L, S, M, D)
//   [23]    side      ISA unit side (0 = unit 1 / A side, 1 = unit 2 / B side)
//   [22:19] opc       opcode within the class
//   [18:14] dst       {file, index} of the destination (store data for STW)
//   [13:9]  src1      {file, index} of the first source
//   [8]     imm_flag  1: second operand is the sign-extended 8-bit field [7:0]
//   [7:3]   src2      {file, index} of the second source (when imm_flag = 0)
//   [13:0]  imm14     constant of MVK and absolute word target of B
//   NOP n   is class L, opcode NOP, with n in [3:0]
package smt_vliw_pkg;

  localparam int XLEN    = 32;  // register width
  localparam int NREGS   = 16;  // registers per file
  localparam int FP_OPS  = 8;   // operations per fetch packet
  localparam int RADDR_W = 5;   // {file, index}
  localparam int EPC_W   = 8;   // width of the per-thread EP sequence counters

  typedef enum logic [1:0] {
    CL_L = 2'd0,
    CL_S = 2'd1,
    CL_M = 2'd2,
    CL_D = 2'd3
  } fu_class_e;

  // Execution latencies per class (cycles = EPs counted by the copy-back unit).
  localparam int LAT_L = 1;
  localparam int LAT_S = 1;
  localparam int LAT_M = 2;
  localparam int LAT_D = 5;

  // L-unit opcodes
  localparam logic [3:0] L_ADD   = 4'd0;
  localparam logic [3:0] L_SUB   = 4'd1;
  localparam logic [3:0] L_AND   = 4'd2;
  localparam logic [3:0] L_OR    = 4'd3;
  localparam logic [3:0] L_XOR   = 4'd4;
  localparam logic [3:0] L_CMPEQ = 4'd5;
  localparam logic [3:0] L_CMPGT = 4'd6;
  localparam logic [3:0] L_CMPLT = 4'd7;
  localparam logic [3:0] L_NOP   = 4'd15;
  // S-unit opcodes
  localparam logic [3:0] S_ADD   = 4'd0;
  localparam logic [3:0] S_SUB   = 4'd1;
  localparam logic [3:0] S_SHL   = 4'd2;
  localparam logic [3:0] S_SHRU  = 4'd3;
  localparam logic [3:0] S_SHRA  = 4'd4;
  localparam logic [3:0] S_MVK   = 4'd5;
  localparam logic [3:0] S_B     = 4'd7;
  // M-unit opcodes
  localparam logic [3:0] M_MPY   = 4'd0;  // signed 16 x 16
  localparam logic [3:0] M_MPYU  = 4'd1;  // unsigned 16 x 16
  // D-unit opcodes
  localparam logic [3:0] D_LDW   = 4'd0;
  localparam logic [3:0] D_STW   = 4'd1;

  typedef struct packed {
    logic             p;
    logic             pred_en;
    logic             pred_z;
    logic             pred_side;
    logic [1:0]       pred_reg;
    fu_class_e        cls;
    logic             side;
    logic [3:0]       opc;
    logic [4:0]       dst;
    logic [4:0]       src1;
    logic             imm_flag;
    logic [7:0]       lo;
  } instr_t;

  // Decoded command handed from the DC stage to a functional unit's E1 stage.
  typedef struct packed {
    logic             valid;
    logic [1:0]       thread;
    fu_class_e        cls;
    logic [3:0]       opc;
    logic [4:0]       dst;
    logic [4:0]       src1;
    logic [4:0]       src2;
    logic             use_imm;
    logic [XLEN-1:0]  imm;
    logic             pred_en;
    logic             pred_z;
    logic [4:0]       pred_reg;
    logic             writes_reg;  // result goes through a delay buffer
  } fu_cmd_t;

  function automatic logic is_nop(instr_t i);
    return i.cls == CL_L && i.opc == L_NOP;
  endfunction

  function automatic logic [3:0] nop_count(instr_t i);
    return (i.lo[3:0] == 4'd0) ? 4'd1 : i.lo[3:0];
  endfunction

  function automatic int class_lat(fu_class_e c);
    case (c)
      CL_L: return LAT_L;
      CL_S: return LAT_S;
      CL_M: return LAT_M;
      default: return LAT_D;
    endcase
  endfunction


  // Physical functional-unit layout.  Units are numbered L units first, then
  // S, M and D units; nl/ns/nm/nd are the hardware counts of each class.
  function automatic fu_class_e unit_class(int u, int nl, int ns, int nm, int nd);
    if (u < nl) return CL_L;
    if (u < nl + ns) return CL_S;
    if (u < nl + ns + nm) return CL_M;
    return CL_D;
  endfunction

  function automatic int class_count(fu_class_e c, int nl, int ns, int nm, int nd);
    case (c)
      CL_L: return nl;
      CL_S: return ns;
      CL_M: return nm;
      default: return nd;
    endcase
  endfunction

  function automatic int class_first(fu_class_e c, int nl, int ns, int nm, int nd);
    case (c)
      CL_L: return 0;
      CL_S: return nl;
      CL_M: return nl + ns;
      default: return nl + ns + nm;
    endcase
  endfunction

  // Delay-buffer entries a unit needs per thread: its latency when the class
  // has exactly the two ISA units (one op per EP per unit), twice that when
  // hardware and ISA counts differ (a unit may then take both ops of an EP).
  function automatic int unit_depth(int u, int nl, int ns, int nm, int nd);
    fu_class_e c;
    c = unit_class(u, nl, ns, nm, nd);
    return class_lat(c) * ((class_count(c, nl, ns, nm, nd) == 2) ? 1 : 2);
  endfunction

  function automatic int unit_base(int u, int nl, int ns, int nm, int nd);
    int b;
    b = 0;
    for (int k = 0; k < u; k++) b += unit_depth(k, nl, ns, nm, nd);
    return b;
  endfunction

  // Builders used by testbenches to write programs readably.
  function automatic logic [31:0] op_rrr(logic p, fu_class_e c, logic side, logic [3:0] opc,
                                         logic [4:0] dst, logic [4:0] s1, logic [4:0] s2);
    instr_t i;
    i = '0;
    i.p = p; i.cls = c; i.side = side; i.opc = opc; i.dst = dst; i.src1 = s1;
    i.lo = {s2, 3'b000};
    return i;
  endfunction

  function automatic logic [31:0] op_rri(logic p, fu_class_e c, logic side, logic [3:0] opc,
                                         logic [4:0] dst, logic [4:0] s1, logic [7:0] imm);
    instr_t i;
    i = '0;
    i.p = p; i.cls = c; i.side = side; i.opc = opc; i.dst = dst; i.src1 = s1;
    i.imm_flag = 1'b1; i.lo = imm;
    return i;
  endfunction

  function automatic logic [31:0] op_k14(logic p, logic side, logic [3:0] opc,
                                         logic [4:0] dst, logic [13:0] k);
    logic [31:0] w;
    instr_t i;
    i = '0;
    i.p = p; i.cls = CL_S; i.side = side; i.opc = opc; i.dst = dst;
    w = i;
    w[13:0] = k;
    return w;
  endfunction

  function automatic logic [31:0] op_nop(logic p, logic [3:0] n);
    instr_t i;
    i = '0;
    i.p = p; i.cls = CL_L; i.opc = L_NOP; i.lo = {4'd0, n};
    return i;
  endfunction

  function automatic logic [31:0] with_pred(logic [31:0] w, logic z, logic [2:0] preg);
    logic [31:0] r;
    r = w;
    r[30] = 1'b1;
    r[29] = z;
    r[28:26] = preg;
    return r;
  endfunction

endpackage
