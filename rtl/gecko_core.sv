// gecko_core: the processor of one vector core: the gecko RV32I integer pipeline
// (Fetch, Decode with the register file, Execute, Memory, Writeback, System
// Management) with the basilisk scalar FPU and the 16-lane vector unit attached to
// Decode. Fetch reads the instruction scratchpad and Memory the data scratchpad, each
// with one cycle of latency and no cache.
// The pipeline avoids a full forwarding network: Execute keeps its last result for
// the next instruction, forwards register-to-register results directly to Writeback,
// and Writeback merges the result streams (Memory, Execute, System, FPU, VPU, in that
// priority) into the single register-file write port. Branches are predicted not
// taken and resolved in Execute.
// An undefined instruction, an ecall/ebreak or a data access outside the scratchpad
// halts the core and pulses exc_valid with a cause; only a reset restarts it, at
// address 0 of the instruction memory.
module gecko_core
  import gecko_pkg::*;
  import basilisk_pkg::*;
  import vpu_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 16384
) (
  input  logic        clk,
  input  logic [31:0] hart_id,
  input  logic        rst,
  output logic        imem_en,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic        dmem_en,
  output logic [3:0]  dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  output logic        exc_valid,
  output exc_cause_e  exc_cause,
  output logic [31:0] exc_info,     // pc of the instruction, or the faulting address
  output logic        halted
);
  // Fetch -> Decode
  logic        f_valid, f_ready;
  logic [31:0] f_instr, f_pc;
  epoch_t      f_epoch;
  // Decode -> units
  logic                  ex_valid, ex_ready;
  gecko_exec_command_t   ex_cmd;
  logic                  sys_valid, sys_ready;
  gecko_sys_command_t    sys_cmd;
  logic                  fpu_valid, fpu_ready;
  basilisk_fpu_command_t fpu_cmd;
  logic                  vpu_valid, vpu_ready;
  vpu_command_t          vpu_cmd;
  // Execute
  logic                jump_valid, branch_resolved;
  gecko_jump_command_t jump;
  logic                mem_valid, mem_ready;
  gecko_mem_command_t  mem_cmd;
  // Writeback streams: 0 memory, 1 execute, 2 system, 3 fpu, 4 vpu
  logic              wb_in_valid  [5];
  logic              wb_in_ready  [5];
  gecko_reg_result_t wb_in_result [5];
  logic              wb_valid;
  gecko_reg_result_t wb_result;
  // Exceptions
  logic        dec_exc, mem_exc;
  exc_cause_e  dec_cause;
  logic [31:0] dec_pc, mem_addr;
  logic        dec_halted, mem_halt_q;
  logic        fpu_done, vpu_done;

  gecko_fetch u_fetch (
    .clk, .rst,
    .halt      (dec_halted || mem_halt_q),
    .imem_en, .imem_addr, .imem_rdata,
    .out_valid (f_valid), .out_ready(f_ready),
    .out_instr (f_instr), .out_pc(f_pc), .out_epoch(f_epoch),
    .jump_valid, .jump
  );

  gecko_decode u_decode (
    .clk, .rst,
    .in_valid  (f_valid && !mem_halt_q), .in_ready(f_ready),
    .in_instr  (f_instr), .in_pc(f_pc), .in_epoch(f_epoch),
    .ex_valid, .ex_ready, .ex_cmd,
    .jump_valid, .branch_resolved,
    .sys_valid, .sys_ready, .sys_cmd,
    .fpu_valid, .fpu_ready, .fpu_cmd,
    .vpu_valid, .vpu_ready, .vpu_cmd,
    .wb_valid, .wb_result,
    .exc_valid (dec_exc), .exc_cause(dec_cause), .exc_pc(dec_pc),
    .halted    (dec_halted)
  );

  gecko_execute u_execute (
    .clk, .rst,
    .ex_valid, .ex_ready, .ex_cmd,
    .wb_valid  (wb_in_valid[1]), .wb_ready(wb_in_ready[1]), .wb_result(wb_in_result[1]),
    .mem_valid, .mem_ready, .mem_cmd,
    .jump_valid, .jump, .branch_resolved
  );

  gecko_memory #(.DMEM_BYTES(DMEM_BYTES)) u_memory (
    .clk, .rst,
    .mem_valid (mem_valid && !mem_halt_q), .mem_ready, .mem_cmd,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .wb_valid  (wb_in_valid[0]), .wb_ready(wb_in_ready[0]), .wb_result(wb_in_result[0]),
    .exc_valid (mem_exc), .exc_addr(mem_addr)
  );

  gecko_system u_system (
    .hart_id,
    .clk, .rst,
    .cmd_valid (sys_valid), .cmd_ready(sys_ready), .cmd(sys_cmd),
    .res_valid (wb_in_valid[2]), .res_ready(wb_in_ready[2]), .res(wb_in_result[2]),
    .fpu_op_done(fpu_done), .vpu_op_done(vpu_done)
  );

  basilisk_fpu u_fpu (
    .clk, .rst,
    .cmd_valid (fpu_valid), .cmd_ready(fpu_ready), .cmd(fpu_cmd),
    .res_valid (wb_in_valid[3]), .res_ready(wb_in_ready[3]), .res(wb_in_result[3]),
    .op_done   (fpu_done)
  );

  vpu u_vpu (
    .clk, .rst,
    .cmd_valid (vpu_valid), .cmd_ready(vpu_ready), .cmd(vpu_cmd),
    .res_valid (wb_in_valid[4]), .res_ready(wb_in_ready[4]), .res(wb_in_result[4]),
    .op_done   (vpu_done)
  );

  gecko_writeback #(.STREAMS(5)) u_writeback (
    .clk, .rst,
    .in_valid  (wb_in_valid), .in_ready(wb_in_ready), .in_result(wb_in_result),
    .out_valid (wb_valid), .out_result(wb_result)
  );

  // A memory fault halts the core like a decode exception
  always_ff @(posedge clk) begin
    if (rst)          mem_halt_q <= 1'b0;
    else if (mem_exc) mem_halt_q <= 1'b1;
  end

  assign exc_valid = dec_exc || mem_exc;
  assign exc_cause = mem_exc ? EXC_MEMORY : dec_cause;
  assign exc_info  = mem_exc ? mem_addr : dec_pc;
  assign halted    = dec_halted || mem_halt_q;
endmodule
