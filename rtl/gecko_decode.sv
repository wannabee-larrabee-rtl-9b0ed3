// gecko_decode: Decode stage of the gecko integer pipeline, holding the integer
// register file (32 x 32 bits, asynchronous read, a single write port so that it
// maps onto FPGA distributed RAM) and one valid bit per register.
//
// Issue rules (from the pipeline's design, there is no full forwarding network):
//  * Issuing an instruction that writes rd marks rd invalid; Writeback marks it valid
//    again when the result (or the release of a killed instruction) arrives.
//  * An instruction whose source is invalid waits, except when the source is the
//    destination of the last register-to-register instruction sent to Execute: then
//    Execute is told to use its saved last result instead (a_saved/b_saved/s_saved).
//  * An instruction whose destination is invalid waits (no write-after-write
//    reordering between the differently long paths into Writeback).
//  * Branches and jumps are predicted not taken. Instructions that go to Execute keep
//    issuing behind an unresolved branch; Execute discards them by epoch if the branch
//    is taken. Instructions for the CSR unit, the FPU and the vector unit, and
//    exceptions, wait until no branch is pending.
// Outputs: a registered command slot for Execute (ex_valid/ex_ready, ready meaning
// the slot is consumed this cycle) and combinational valid/ready command ports for
// the system unit, the FPU and the vector unit. An undefined instruction or an
// ecall/ebreak raises exc_valid once and halts the core until reset.
module gecko_decode
  import gecko_pkg::*;
  import basilisk_pkg::*;
  import vpu_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // From Fetch
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [31:0]           in_instr,
  input  logic [31:0]           in_pc,
  input  epoch_t                in_epoch,
  // To Execute
  output logic                  ex_valid,
  input  logic                  ex_ready,
  output gecko_exec_command_t   ex_cmd,
  // Jump and branch resolution from Execute
  input  logic                  jump_valid,
  input  logic                  branch_resolved,
  // To System Management
  output logic                  sys_valid,
  input  logic                  sys_ready,
  output gecko_sys_command_t    sys_cmd,
  // To the FPU
  output logic                  fpu_valid,
  input  logic                  fpu_ready,
  output basilisk_fpu_command_t fpu_cmd,
  // To the vector unit
  output logic                  vpu_valid,
  input  logic                  vpu_ready,
  output vpu_command_t          vpu_cmd,
  // From Writeback
  input  logic                  wb_valid,
  input  gecko_reg_result_t     wb_result,
  // Exceptions
  output logic                  exc_valid,
  output exc_cause_e            exc_cause,
  output logic [31:0]           exc_pc,
  output logic                  halted
);
  logic [31:0] regs [32];
  logic [31:0] reg_valid;
  logic        fwd_valid_q;
  logic [4:0]  fwd_rd_q;
  logic [2:0]  branches_pending;
  logic        ex_valid_q;
  gecko_exec_command_t ex_cmd_q;
  logic        halted_q;

  // Instruction fields
  logic [6:0]  opc;
  logic [4:0]  rd, rs1, rs2, rs3;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [5:0]  f6;
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  assign opc = in_instr[6:0];
  assign rd  = in_instr[11:7];
  assign f3  = in_instr[14:12];
  assign rs1 = in_instr[19:15];
  assign rs2 = in_instr[24:20];
  assign rs3 = in_instr[31:27];
  assign f7  = in_instr[31:25];
  assign f6  = in_instr[31:26];
  assign imm_i = {{20{in_instr[31]}}, in_instr[31:20]};
  assign imm_s = {{20{in_instr[31]}}, in_instr[31:25], in_instr[11:7]};
  assign imm_b = {{19{in_instr[31]}}, in_instr[31], in_instr[7], in_instr[30:25], in_instr[11:8], 1'b0};
  assign imm_u = {in_instr[31:12], 12'd0};
  assign imm_j = {{11{in_instr[31]}}, in_instr[31], in_instr[19:12], in_instr[20], in_instr[30:21], 1'b0};

  // Register file read ports; x0 reads as zero
  logic [31:0] rf_rs1, rf_rs2;
  assign rf_rs1 = (rs1 == 5'd0) ? 32'd0 : regs[rs1];
  assign rf_rs2 = (rs2 == 5'd0) ? 32'd0 : regs[rs2];

  typedef enum logic [2:0] {D_NONE, D_EXEC, D_SYS, D_FPU, D_VPU, D_EXC} dest_e;

  // Decoded instruction
  dest_e                 dest;
  exc_cause_e            dec_cause;
  logic                  use_rs1, use_rs2, wr_rd;
  gecko_exec_command_t   dcmd;
  basilisk_fpu_command_t fcmd;
  vpu_command_t          vcmd;
  gecko_sys_command_t    scmd;

  always_comb begin
    dest      = D_EXC;
    dec_cause = EXC_ILLEGAL;
    use_rs1   = 1'b0;
    use_rs2   = 1'b0;
    wr_rd     = 1'b0;
    dcmd        = '0;
    dcmd.pc     = in_pc;
    dcmd.rd     = rd;
    dcmd.funct3 = f3;
    dcmd.epoch  = in_epoch;
    dcmd.imm    = imm_i;
    dcmd.op_a   = rf_rs1;
    dcmd.op_b   = imm_i;
    dcmd.rs2_val = rf_rs2;
    dcmd.kind   = EX_ALU;
    dcmd.alu_op = ALU_ADD;
    fcmd         = '0;
    fcmd.rm      = f3;
    fcmd.rs1     = rs1;
    fcmd.rs2     = rs2;
    fcmd.rs3     = rs3;
    fcmd.rd      = rd;
    fcmd.int_val = rf_rs1;
    fcmd.op      = FOP_ADD;
    vcmd         = '0;
    vcmd.vd      = rd;
    vcmd.vs1     = rs1;
    vcmd.vs2     = rs2;
    vcmd.rd      = rd;
    vcmd.scalar  = rf_rs1;
    vcmd.op      = VOP_FADD;
    scmd         = '0;
    scmd.op      = f3[1:0];
    scmd.csr     = in_instr[31:20];
    scmd.value   = f3[2] ? {27'd0, rs1} : rf_rs1;
    scmd.rd      = rd;

    unique case (opc)
      OPC_LUI: begin
        dest = D_EXEC; wr_rd = 1'b1;
        dcmd.alu_op = ALU_PASS_B; dcmd.op_b = imm_u;
      end
      OPC_AUIPC: begin
        dest = D_EXEC; wr_rd = 1'b1;
        dcmd.op_a = in_pc; dcmd.op_b = imm_u;
      end
      OPC_JAL: begin
        dest = D_EXEC; wr_rd = 1'b1;
        dcmd.kind = EX_JAL; dcmd.imm = imm_j;
      end
      OPC_JALR: if (f3 == 3'b000) begin
        dest = D_EXEC; wr_rd = 1'b1; use_rs1 = 1'b1;
        dcmd.kind = EX_JALR; dcmd.imm = imm_i;
      end
      OPC_BRANCH: if (f3 != 3'b010 && f3 != 3'b011) begin
        dest = D_EXEC; use_rs1 = 1'b1; use_rs2 = 1'b1;
        dcmd.kind = EX_BRANCH; dcmd.imm = imm_b; dcmd.op_b = rf_rs2;
      end
      OPC_LOAD: if (f3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101}) begin
        dest = D_EXEC; wr_rd = 1'b1; use_rs1 = 1'b1;
        dcmd.kind = EX_LOAD;
      end
      OPC_STORE: if (f3 inside {3'b000, 3'b001, 3'b010}) begin
        dest = D_EXEC; use_rs1 = 1'b1; use_rs2 = 1'b1;
        dcmd.kind = EX_STORE; dcmd.op_b = imm_s;
      end
      OPC_OPIMM: begin
        dest = D_EXEC; wr_rd = 1'b1; use_rs1 = 1'b1;
        unique case (f3)
          3'b000: dcmd.alu_op = ALU_ADD;
          3'b010: dcmd.alu_op = ALU_SLT;
          3'b011: dcmd.alu_op = ALU_SLTU;
          3'b100: dcmd.alu_op = ALU_XOR;
          3'b110: dcmd.alu_op = ALU_OR;
          3'b111: dcmd.alu_op = ALU_AND;
          3'b001: begin
            dcmd.alu_op = ALU_SLL;
            if (f7 != 7'd0) dest = D_EXC;
          end
          default: begin
            dcmd.alu_op = in_instr[30] ? ALU_SRA : ALU_SRL;
            if (f7 != 7'd0 && f7 != 7'b0100000) dest = D_EXC;
          end
        endcase
      end
      OPC_OP: begin
        dest = D_EXEC; wr_rd = 1'b1; use_rs1 = 1'b1; use_rs2 = 1'b1;
        dcmd.op_b = rf_rs2;
        unique case ({f7, f3})
          10'b0000000_000: dcmd.alu_op = ALU_ADD;
          10'b0100000_000: dcmd.alu_op = ALU_SUB;
          10'b0000000_001: dcmd.alu_op = ALU_SLL;
          10'b0000000_010: dcmd.alu_op = ALU_SLT;
          10'b0000000_011: dcmd.alu_op = ALU_SLTU;
          10'b0000000_100: dcmd.alu_op = ALU_XOR;
          10'b0000000_101: dcmd.alu_op = ALU_SRL;
          10'b0100000_101: dcmd.alu_op = ALU_SRA;
          10'b0000000_110: dcmd.alu_op = ALU_OR;
          10'b0000000_111: dcmd.alu_op = ALU_AND;
          default: dest = D_EXC;
        endcase
      end
      OPC_FENCE: dest = D_NONE;             // single in-order core: nothing to order
      OPC_SYSTEM: begin
        if (f3 == 3'b000) begin
          if (in_instr[31:7] == 25'd0 || in_instr[31:7] == {12'd1, 13'd0}) dec_cause = EXC_ECALL;
        end else if (f3 != 3'b100) begin
          dest = D_SYS; wr_rd = 1'b1; use_rs1 = !f3[2];
        end
      end
      OPC_OPFP: if (in_instr[26:25] == 2'b00) begin
        dest = D_FPU;
        unique casez ({f7, f3})
          10'b0000000_???: fcmd.op = FOP_ADD;
          10'b0000100_???: fcmd.op = FOP_SUB;
          10'b0001000_???: fcmd.op = FOP_MUL;
          10'b0001100_???: fcmd.op = FOP_DIV;
          10'b0101100_???: fcmd.op = FOP_SQRT;
          10'b0010000_000: fcmd.op = FOP_SGNJ;
          10'b0010000_001: fcmd.op = FOP_SGNJN;
          10'b0010000_010: fcmd.op = FOP_SGNJX;
          10'b0010100_000: fcmd.op = FOP_MIN;
          10'b0010100_001: fcmd.op = FOP_MAX;
          10'b1100000_???: begin fcmd.op = rs2[0] ? FOP_CVT_WU : FOP_CVT_W; wr_rd = 1'b1; end
          10'b1110000_000: begin fcmd.op = FOP_MV_X_W; wr_rd = 1'b1; end
          10'b1010000_010: begin fcmd.op = FOP_EQ; wr_rd = 1'b1; end
          10'b1010000_001: begin fcmd.op = FOP_LT; wr_rd = 1'b1; end
          10'b1010000_000: begin fcmd.op = FOP_LE; wr_rd = 1'b1; end
          10'b1101000_???: begin fcmd.op = rs2[0] ? FOP_CVT_S_WU : FOP_CVT_S_W; use_rs1 = 1'b1; end
          10'b1111000_000: begin fcmd.op = FOP_MV_W_X; use_rs1 = 1'b1; end
          default: dest = D_EXC;
        endcase
      end
      OPC_FMADD, OPC_FMSUB, OPC_FNMSUB, OPC_FNMADD: if (in_instr[26:25] == 2'b00) begin
        dest = D_FPU;
        unique case (opc)
          OPC_FMADD:  fcmd.op = FOP_MADD;
          OPC_FMSUB:  fcmd.op = FOP_MSUB;
          OPC_FNMSUB: fcmd.op = FOP_NMSUB;
          default:    fcmd.op = FOP_NMADD;
        endcase
      end
      OPC_OPV: begin
        if (f3 == 3'b111) begin
          // vsetvli / vsetivli / vsetvl: the vector length is fixed at LANES
          dest = D_EXEC; wr_rd = 1'b1;
          dcmd.alu_op = ALU_PASS_B; dcmd.op_b = LANES;
        end else if (in_instr[25]) begin
          dest = D_VPU;
          unique casez ({f6, f3})
            9'b000000_001: vcmd.op = VOP_FADD;
            9'b000010_001: vcmd.op = VOP_FSUB;
            9'b100100_001: vcmd.op = VOP_FMUL;
            9'b101100_001: vcmd.op = VOP_FMACC;
            9'b010111_100: begin vcmd.op = VOP_MV_V_X; use_rs1 = 1'b1; if (rs2 != 0) dest = D_EXC; end
            9'b001111_110: begin vcmd.op = VOP_SLIDE1DOWN; use_rs1 = 1'b1; end
            9'b010000_010: begin vcmd.op = VOP_MV_X_S; wr_rd = 1'b1; if (rs1 != 0) dest = D_EXC; end
            default: dest = D_EXC;
          endcase
        end
      end
      default: ;
    endcase
    if (dest != D_EXC) dec_cause = EXC_NONE;
    if (dest == D_EXC || dest == D_NONE) begin
      use_rs1 = 1'b0; use_rs2 = 1'b0; wr_rd = 1'b0;
    end
  end

  // Source availability, with the Execute saved-result path for Execute-bound instructions
  logic rs1_fwd, rs2_fwd, rs1_ok, rs2_ok, rd_ok, spec_ok, hazard_ok, issue;
  assign rs1_fwd = (dest == D_EXEC) && fwd_valid_q && (fwd_rd_q == rs1) && (rs1 != 5'd0);
  assign rs2_fwd = (dest == D_EXEC) && fwd_valid_q && (fwd_rd_q == rs2) && (rs2 != 5'd0);
  assign rs1_ok  = !use_rs1 || reg_valid[rs1] || rs1_fwd;
  assign rs2_ok  = !use_rs2 || reg_valid[rs2] || rs2_fwd;
  assign rd_ok   = !wr_rd || reg_valid[rd];
  assign spec_ok = (dest == D_EXEC) || (dest == D_NONE) || (branches_pending == 3'd0);
  assign hazard_ok = rs1_ok && rs2_ok && rd_ok && spec_ok && !halted_q;

  always_comb begin
    issue = 1'b0;
    if (in_valid && hazard_ok && !jump_valid) begin
      unique case (dest)
        D_EXEC:  issue = !ex_valid_q || ex_ready;
        D_SYS:   issue = sys_ready;
        D_FPU:   issue = fpu_ready;
        D_VPU:   issue = vpu_ready;
        default: issue = 1'b1;               // D_NONE, D_EXC
      endcase
    end
  end

  // A jump flushes whatever Fetch presents this cycle
  assign in_ready  = issue || jump_valid || halted_q;
  assign sys_valid = in_valid && hazard_ok && !jump_valid && (dest == D_SYS);
  assign fpu_valid = in_valid && hazard_ok && !jump_valid && (dest == D_FPU);
  assign vpu_valid = in_valid && hazard_ok && !jump_valid && (dest == D_VPU);
  assign sys_cmd   = scmd;
  assign fpu_cmd   = fcmd;
  assign vpu_cmd   = vcmd;

  logic is_ctrl;
  assign is_ctrl = dcmd.kind inside {EX_BRANCH, EX_JAL, EX_JALR};

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_valid        <= '1;
      fwd_valid_q      <= 1'b0;
      fwd_rd_q         <= '0;
      branches_pending <= '0;
      ex_valid_q       <= 1'b0;
      ex_cmd_q         <= '0;
      halted_q         <= 1'b0;
      exc_valid        <= 1'b0;
      exc_cause        <= EXC_NONE;
      exc_pc           <= '0;
    end else begin
      exc_valid <= 1'b0;
      if (ex_ready) ex_valid_q <= 1'b0;
      branches_pending <= branches_pending
                          + ((issue && dest == D_EXEC && is_ctrl) ? 3'd1 : 3'd0)
                          - (branch_resolved ? 3'd1 : 3'd0);
      if (wb_valid) reg_valid[wb_result.rd] <= 1'b1;
      if (issue) begin
        if (wr_rd && rd != 5'd0) reg_valid[rd] <= 1'b0;
        unique case (dest)
          D_EXEC: begin
            ex_valid_q <= 1'b1;
            ex_cmd_q   <= dcmd;
            ex_cmd_q.a_saved <= rs1_fwd && use_rs1;
            ex_cmd_q.b_saved <= rs2_fwd && use_rs2 && (dcmd.kind == EX_ALU || dcmd.kind == EX_BRANCH);
            ex_cmd_q.s_saved <= rs2_fwd && use_rs2 && (dcmd.kind == EX_STORE);
            fwd_valid_q <= (dcmd.kind == EX_ALU) && wr_rd && (rd != 5'd0);
            fwd_rd_q    <= rd;
          end
          D_EXC: begin
            halted_q  <= 1'b1;
            exc_valid <= 1'b1;
            exc_cause <= dec_cause;
            exc_pc    <= in_pc;
          end
          default: if (wr_rd && rd == fwd_rd_q) fwd_valid_q <= 1'b0;
        endcase
      end
      if (jump_valid) fwd_valid_q <= 1'b0;
    end
  end

  // Register file write port (Writeback)
  always_ff @(posedge clk) begin
    if (wb_valid && wb_result.write && wb_result.rd != 5'd0) regs[wb_result.rd] <= wb_result.value;
  end

  assign ex_valid = ex_valid_q;
  assign ex_cmd   = ex_cmd_q;
  assign halted   = halted_q;
endmodule
