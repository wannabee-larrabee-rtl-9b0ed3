// tb_gecko_execute: drives the Execute stage with random ALU, branch, jump, load and
// store commands and compares its outputs with a reference model written in the
// testbench: ALU results and link values to Writeback, addresses and store data to
// Memory, jump targets, the use of the saved last result, and the discarding of
// instructions with a stale epoch after a taken branch (release only, no jump, no
// memory access). Writeback and Memory ready are toggled at random.
module tb_gecko_execute;
  import gecko_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ex_valid, ex_ready, wb_valid, wb_ready, mem_valid, mem_ready, jump_valid, branch_resolved;
  gecko_exec_command_t ex_cmd;
  gecko_reg_result_t   wb_result;
  gecko_mem_command_t  mem_cmd;
  gecko_jump_command_t jump;
  int checks = 0, failures = 0, kills = 0, taken_n = 0, saved_n = 0;

  gecko_execute dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_SLL:  return a << b[4:0];
      ALU_SLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      ALU_SLTU: return (a < b) ? 1 : 0;
      ALU_XOR:  return a ^ b;
      ALU_SRL:  return a >> b[4:0];
      ALU_SRA:  return $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:   return a | b;
      ALU_AND:  return a & b;
      default:  return b;
    endcase
  endfunction

  function automatic bit ref_taken(logic [2:0] f3, logic [31:0] a, logic [31:0] b);
    case (f3)
      0: return a == b;
      1: return a != b;
      4: return $signed(a) < $signed(b);
      5: return $signed(a) >= $signed(b);
      6: return a < b;
      7: return a >= b;
      default: return 0;
    endcase
  endfunction

  logic [31:0] saved, a, b, exp;
  epoch_t      epoch;
  int          k;

  initial begin
    ex_valid = 0; ex_cmd = '0; wb_ready = 0; mem_ready = 0;
    saved = 0; epoch = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ex_cmd = '0;
      k = $urandom % 10;
      ex_cmd.kind   = (k < 5) ? EX_ALU : (k == 5) ? EX_BRANCH : (k == 6) ? EX_LOAD : (k == 7) ? EX_STORE :
                      (k == 8) ? EX_JAL : EX_JALR;
      ex_cmd.alu_op = alu_op_e'($urandom % 11);
      ex_cmd.funct3 = 3'($urandom);
      ex_cmd.pc     = {$urandom % 4096, 2'b00};
      ex_cmd.op_a   = ($urandom % 3 == 0) ? 32'($urandom % 4) : $urandom;
      ex_cmd.op_b   = ($urandom % 3 == 0) ? 32'($urandom % 4) : $urandom;
      ex_cmd.rs2_val = $urandom;
      ex_cmd.imm    = 32'($signed(12'($urandom)));
      ex_cmd.a_saved = ($urandom % 4) == 0;
      ex_cmd.b_saved = ($urandom % 4) == 0;
      ex_cmd.s_saved = ($urandom % 4) == 0;
      ex_cmd.rd     = 5'($urandom);
      ex_cmd.epoch  = (($urandom % 8) == 0) ? epoch - 1'b1 : epoch;   // some stale instructions
      ex_valid = 1;
      a = ex_cmd.a_saved ? saved : ex_cmd.op_a;
      b = ex_cmd.b_saved ? saved : ex_cmd.op_b;
      do begin
        wb_ready = $urandom % 2; mem_ready = $urandom % 2;
        #1;
        if (!ex_ready) @(negedge clk);
      end while (!ex_ready);
      // ex_ready is high: check the outputs of this cycle
      checks++;
      if (ex_cmd.epoch != epoch) begin
        kills++;
        if (jump_valid || mem_valid) failures++;
        if ((ex_cmd.kind inside {EX_ALU, EX_JAL, EX_JALR, EX_LOAD}) != wb_valid) failures++;
        if (wb_valid && wb_result.write) failures++;
      end else begin
        unique case (ex_cmd.kind)
          EX_ALU: begin
            exp = ref_alu(ex_cmd.alu_op, a, b);
            if (!wb_valid || wb_result.value != exp || wb_result.rd != ex_cmd.rd || !wb_result.write || jump_valid) failures++;
            if (ex_cmd.a_saved || ex_cmd.b_saved) saved_n++;
            saved = exp;
          end
          EX_BRANCH: begin
            if (jump_valid != ref_taken(ex_cmd.funct3, a, b)) failures++;
            if (jump_valid && jump.target != ex_cmd.pc + ex_cmd.imm) failures++;
            if (!branch_resolved || wb_valid || mem_valid) failures++;
          end
          EX_JAL, EX_JALR: begin
            exp = (ex_cmd.kind == EX_JAL) ? ex_cmd.pc + ex_cmd.imm : ((a + ex_cmd.imm) & ~32'd1);
            if (!jump_valid || jump.target != exp || !wb_valid || wb_result.value != ex_cmd.pc + 4) failures++;
          end
          EX_LOAD: if (!mem_valid || mem_cmd.store || mem_cmd.addr != a + ex_cmd.imm || wb_valid) failures++;
          default: if (!mem_valid || !mem_cmd.store || mem_cmd.addr != a + b ||
                       mem_cmd.data != (ex_cmd.s_saved ? saved : ex_cmd.rs2_val)) failures++;
        endcase
        if (jump_valid) begin epoch = epoch + 1'b1; taken_n++; end
      end
      @(posedge clk);
      #1 ex_valid = 0;
    end
    checks++;
    if (kills < 50 || taken_n < 50 || saved_n < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
