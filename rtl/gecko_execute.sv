// gecko_execute: Execute stage of the gecko integer pipeline. It computes ALU
// results, load/store addresses (the same adder serves both, which is why Memory sits
// after Execute) and branch/jump decisions.
// * Register-to-register results (and jal/jalr link values) skip the Memory stage
//   and go straight to Writeback as a gecko_reg_result_t.
// * The last register-to-register result is saved until the next one is produced;
//   Decode sets a_saved/b_saved/s_saved to use it in place of a register operand.
// * Branches are predicted not taken. A taken branch or a jump sends a
//   gecko_jump_command_t to Fetch and Decode (one-cycle pulse, no flow control) and
//   advances the epoch. Later instructions that still carry the old epoch are
//   discarded here; those with a destination register send a release (write = 0) to
//   Writeback so that Decode marks the register valid again.
// * branch_resolved pulses once for every branch or jump leaving the stage.
// The stage works on the command slot that Decode fills; ex_ready tells Decode the
// slot is consumed in this cycle. Each output stream uses valid/ready.
module gecko_execute
  import gecko_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                ex_valid,
  output logic                ex_ready,
  input  gecko_exec_command_t ex_cmd,
  // Register results to Writeback
  output logic                wb_valid,
  input  logic                wb_ready,
  output gecko_reg_result_t   wb_result,
  // Loads and stores to Memory
  output logic                mem_valid,
  input  logic                mem_ready,
  output gecko_mem_command_t  mem_cmd,
  // Jumps to Fetch and Decode
  output logic                jump_valid,
  output gecko_jump_command_t jump,
  output logic                branch_resolved
);
  epoch_t      epoch_q;
  logic [31:0] saved_q;
  logic        killed;
  logic [31:0] a, b, sdata, alu, sum;
  logic        taken, need_wb, need_mem, is_ctrl;

  assign killed = ex_cmd.epoch != epoch_q;
  assign a      = ex_cmd.a_saved ? saved_q : ex_cmd.op_a;
  assign b      = ex_cmd.b_saved ? saved_q : ex_cmd.op_b;
  assign sdata  = ex_cmd.s_saved ? saved_q : ex_cmd.rs2_val;
  assign sum    = a + b;

  always_comb begin
    unique case (ex_cmd.alu_op)
      ALU_ADD:    alu = sum;
      ALU_SUB:    alu = a - b;
      ALU_SLL:    alu = a << b[4:0];
      ALU_SLT:    alu = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:   alu = {31'd0, a < b};
      ALU_XOR:    alu = a ^ b;
      ALU_SRL:    alu = a >> b[4:0];
      ALU_SRA:    alu = 32'($signed(a) >>> b[4:0]);
      ALU_OR:     alu = a | b;
      ALU_AND:    alu = a & b;
      ALU_PASS_B: alu = b;
      default:    alu = sum;
    endcase
  end

  always_comb begin
    unique case (ex_cmd.funct3)
      3'b000:  taken = (a == b);
      3'b001:  taken = (a != b);
      3'b100:  taken = $signed(a) < $signed(b);
      3'b101:  taken = $signed(a) >= $signed(b);
      3'b110:  taken = a < b;
      3'b111:  taken = a >= b;
      default: taken = 1'b0;
    endcase
  end

  assign is_ctrl  = ex_cmd.kind inside {EX_BRANCH, EX_JAL, EX_JALR};
  assign need_wb  = ex_cmd.kind inside {EX_ALU, EX_JAL, EX_JALR} || (killed && ex_cmd.kind == EX_LOAD);
  assign need_mem = !killed && (ex_cmd.kind inside {EX_LOAD, EX_STORE});
  assign ex_ready = ex_valid && (!need_wb || wb_ready) && (!need_mem || mem_ready);

  assign wb_valid        = ex_valid && need_wb;
  assign wb_result.rd    = ex_cmd.rd;
  assign wb_result.value = (ex_cmd.kind == EX_ALU) ? alu : (ex_cmd.pc + 32'd4);
  assign wb_result.write = !killed;

  assign mem_valid      = ex_valid && need_mem;
  assign mem_cmd.store  = (ex_cmd.kind == EX_STORE);
  assign mem_cmd.funct3 = ex_cmd.funct3;
  assign mem_cmd.addr   = (ex_cmd.kind == EX_STORE) ? sum : (a + ex_cmd.imm);
  assign mem_cmd.data   = sdata;
  assign mem_cmd.rd     = ex_cmd.rd;

  assign jump_valid = ex_ready && !killed &&
                      ((ex_cmd.kind == EX_BRANCH && taken) || ex_cmd.kind inside {EX_JAL, EX_JALR});
  assign jump.target = (ex_cmd.kind == EX_JALR) ? ((a + ex_cmd.imm) & ~32'd1) : (ex_cmd.pc + ex_cmd.imm);
  assign branch_resolved = ex_ready && is_ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      epoch_q <= '0;
      saved_q <= '0;
    end else begin
      if (jump_valid) epoch_q <= epoch_q + 1'b1;
      if (ex_ready && !killed && ex_cmd.kind == EX_ALU) saved_q <= alu;
    end
  end
endmodule
