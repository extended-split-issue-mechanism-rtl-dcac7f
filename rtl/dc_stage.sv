// DC stage: decodes the operations issued by EP-combine for the execute stages.
//
// For each hardware unit the issued operation word (tagged with its thread) is
// decoded into source and destination register addresses, the immediate
// operand, the predicate and whether the result needs a delay-buffer entry,
// and registered as that unit's E1 command.  The per-thread EP-boundary
// signals, raised by EP-combine in the cycle a thread's EP was completed, are
// registered alongside so that the copy-back unit sees each boundary in the
// same cycle as the EP's last operations reach E1.  The stage's role and the
// EP-boundary signal follow the design description; the one-cycle alignment
// and the decode fields are this design's own.
module dc_stage
  import smt_vliw_pkg::*;
#(
  parameter int NT  = 4,
  parameter int NFU = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NFU-1:0]         iss_valid,
  input  logic [NFU-1:0][1:0]    iss_thread,
  input  logic [NFU-1:0][31:0]   iss_op,
  input  logic [NT-1:0]          iss_boundary,
  output fu_cmd_t [NFU-1:0]      e1_cmd,
  output logic [NT-1:0]          e1_boundary
);
  fu_cmd_t [NFU-1:0] dec;

  always_comb begin
    instr_t op;
    for (int u = 0; u < NFU; u++) begin
      op = instr_t'(iss_op[u]);
      dec[u].valid    = iss_valid[u];
      dec[u].thread   = iss_thread[u];
      dec[u].cls      = op.cls;
      dec[u].opc      = op.opc;
      dec[u].dst      = op.dst;
      dec[u].src1     = op.src1;
      dec[u].src2     = op.lo[7:3];
      dec[u].pred_en  = op.pred_en;
      dec[u].pred_z   = op.pred_z;
      dec[u].pred_reg = {op.pred_side, 2'b00, op.pred_reg};
      if (op.cls == CL_S && (op.opc == S_MVK || op.opc == S_B)) begin
        dec[u].use_imm = 1'b1;
        dec[u].imm     = XLEN'($signed(iss_op[u][13:0]));
      end else begin
        dec[u].use_imm = op.imm_flag;
        dec[u].imm     = XLEN'($signed(op.lo));
      end
      dec[u].writes_reg = !((op.cls == CL_S && op.opc == S_B) ||
                            (op.cls == CL_D && op.opc == D_STW));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1_cmd      <= '0;
      e1_boundary <= '0;
    end else begin
      e1_cmd      <= dec;
      e1_boundary <= iss_boundary;
    end
  end
endmodule
