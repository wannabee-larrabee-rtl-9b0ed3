// tb_gecko_decode: checks the issue rules of Decode. Instructions are presented one
// at a time and the test observes which unit receives them and when: the command
// fields sent to Execute, the saved-result flags for a dependence on the last
// register-to-register instruction, stalls on an invalid source or destination
// until Writeback releases the register, CSR/FPU/vector instructions waiting for an
// unresolved branch, register file reads after a write, x0, and the exception and
// halt on an undefined instruction.
module tb_gecko_decode;
  import gecko_pkg::*;
  import basilisk_pkg::*;
  import vpu_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready, ex_valid, ex_ready, jump_valid, branch_resolved;
  logic [31:0] in_instr, in_pc, exc_pc;
  epoch_t in_epoch;
  gecko_exec_command_t ex_cmd;
  logic sys_valid, sys_ready, fpu_valid, fpu_ready, vpu_valid, vpu_ready, wb_valid, exc_valid, halted;
  gecko_sys_command_t sys_cmd;
  basilisk_fpu_command_t fpu_cmd;
  vpu_command_t vpu_cmd;
  gecko_reg_result_t wb_result;
  exc_cause_e exc_cause;
  int checks = 0, failures = 0;

  gecko_decode dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, bit c);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Present an instruction; returns the number of cycles it waited
  task automatic present(logic [31:0] instr, output int waited, input int max_wait = 50);
    @(negedge clk);
    in_instr = instr; in_valid = 1; in_pc += 4;
    waited = 0;
    #1;
    while (!in_ready && waited < max_wait) begin @(negedge clk); #1 waited++; end
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // Writeback of a register
  task automatic writeback(int rd, logic [31:0] v);
    @(negedge clk);
    wb_valid = 1; wb_result = '{rd: 5'(rd), value: v, write: 1'b1};
    @(negedge clk);
    wb_valid = 0;
  endtask

  int w;

  initial begin
    in_valid = 0; in_instr = 0; in_pc = 0; in_epoch = 0; ex_ready = 1; jump_valid = 0; branch_resolved = 0;
    sys_ready = 1; fpu_ready = 1; vpu_ready = 1; wb_valid = 0; wb_result = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // Put known values in x5 and x6
    writeback(5, 32'd100);
    writeback(6, 32'd7);
    present(add(1, 5, 6), w);
    expect_true("add issued", w == 0 && ex_valid && ex_cmd.kind == EX_ALU && ex_cmd.alu_op == ALU_ADD &&
                ex_cmd.op_a == 100 && ex_cmd.op_b == 7 && ex_cmd.rd == 1 && !ex_cmd.a_saved);
    present(addi(2, 1, 3), w);
    expect_true("dependent addi uses saved result", w == 0 && ex_cmd.a_saved && ex_cmd.op_b == 3);
    present(sub(3, 2, 1), w, 5);
    expect_true("x1 not forwarded: stall", w == 5);
    writeback(1, 32'd107);
    present(sub(3, 2, 1), w);
    expect_true("issued after release", w == 0 && ex_cmd.a_saved && !ex_cmd.b_saved && ex_cmd.op_b == 107 &&
                ex_cmd.alu_op == ALU_SUB);
    present(addi(3, 0, 1), w, 5);
    expect_true("write-after-write stall", w == 5);
    writeback(3, 32'd0);
    writeback(2, 32'd110);
    present(addi(3, 0, 1), w);
    expect_true("x0 reads zero", w == 0 && ex_cmd.op_a == 0);
    writeback(3, 32'd1);
    // Branch pending blocks CSR, FPU and vector issue
    present(beq(5, 6, 16), w);
    expect_true("branch issued", w == 0 && ex_cmd.kind == EX_BRANCH && ex_cmd.imm == 16);
    present(csrrs(4, 12'hC00, 0), w, 4);
    expect_true("csr waits for branch", w == 4 && !sys_valid);
    @(negedge clk); branch_resolved = 1; @(negedge clk); branch_resolved = 0;
    fork
      present(csrrs(4, 12'hC00, 0), w);
      begin @(negedge clk); #2; expect_true("csr issued", sys_valid && sys_cmd.csr == 12'hC00 && sys_cmd.rd == 4 && sys_cmd.op == 2); end
    join
    fork
      present(fadd(7, 8, 9), w);
      begin @(negedge clk); #2; expect_true("fadd to fpu", fpu_valid && fpu_cmd.op == FOP_ADD && fpu_cmd.rd == 7 &&
                            fpu_cmd.rs1 == 8 && fpu_cmd.rs2 == 9); end
    join
    fork
      present(vfmul_vv(3, 1, 2), w);
      begin @(negedge clk); #2; expect_true("vfmul to vpu", vpu_valid && vpu_cmd.op == VOP_FMUL && vpu_cmd.vd == 3 &&
                            vpu_cmd.vs2 == 1 && vpu_cmd.vs1 == 2); end
    join
    // FPU busy: instruction waits
    fpu_ready = 0;
    present(fmul(1, 2, 3), w, 3);
    expect_true("fpu busy stall", w == 3);
    fpu_ready = 1;
    present(fmul(1, 2, 3), w);
    // Execute slot full
    ex_ready = 0;
    present(addi(8, 0, 1), w);
    present(addi(9, 0, 1), w, 3);
    expect_true("execute slot full", w == 3);
    ex_ready = 1;
    @(negedge clk);
    // Undefined instruction
    present(32'h0000_0000, w);
    expect_true("exception", exc_valid && exc_cause == EXC_ILLEGAL);
    present(addi(10, 0, 1), w);
    expect_true("halted", halted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
