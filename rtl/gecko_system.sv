// gecko_system: System Management unit of a vector core: the CSRs and the
// performance counters. Besides a 64-bit cycle counter (cycle/cycleh, mcycle) and
// the core number (mhartid), it counts completed floating-point operations (FPU) and
// completed vector operations (VPU), so software can compare operation counts with the
// cycle count. mscratch is a free read/write register.
// CSR instructions (csrrw/csrrs/csrrc and their immediate forms) arrive from Decode as
// gecko_sys_command_t; the old CSR value is returned to Writeback one cycle later
// through a one-entry result register (valid/ready). The counter CSRs are read-only;
// writes to them and accesses to unknown CSRs are ignored and read as zero. The
// custom addresses 0xCC0 (FP operations) and 0xCC1 (vector operations) are this
// implementation's choice.
module gecko_system
  import gecko_pkg::*;
(
  input  logic               clk,
  input  logic [31:0]        hart_id,   // constant strap: this core's mhartid
  input  logic               rst,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  gecko_sys_command_t cmd,
  output logic               res_valid,
  input  logic               res_ready,
  output gecko_reg_result_t  res,
  input  logic               fpu_op_done,
  input  logic               vpu_op_done
);
  logic [63:0] cycle_q;
  logic [31:0] fpops_q, vecops_q, scratch_q;
  logic        res_valid_q;
  gecko_reg_result_t res_q;
  logic [31:0] old, newv;

  always_comb begin
    unique case (cmd.csr)
      CSR_CYCLE, CSR_MCYCLE: old = cycle_q[31:0];
      CSR_CYCLEH:            old = cycle_q[63:32];
      CSR_MHARTID:           old = hart_id;
      CSR_MSCRATCH:          old = scratch_q;
      CSR_FPOPS:             old = fpops_q;
      CSR_VECOPS:            old = vecops_q;
      default:               old = '0;
    endcase
    unique case (cmd.op)
      2'd1:    newv = cmd.value;
      2'd2:    newv = old | cmd.value;
      2'd3:    newv = old & ~cmd.value;
      default: newv = old;
    endcase
  end

  assign cmd_ready = !res_valid_q || res_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      cycle_q     <= '0;
      fpops_q     <= '0;
      vecops_q    <= '0;
      scratch_q   <= '0;
      res_valid_q <= 1'b0;
      res_q       <= '0;
    end else begin
      cycle_q <= cycle_q + 64'd1;
      if (fpu_op_done) fpops_q  <= fpops_q + 32'd1;
      if (vpu_op_done) vecops_q <= vecops_q + 32'd1;
      if (res_ready) res_valid_q <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        res_valid_q <= 1'b1;
        res_q       <= '{rd: cmd.rd, value: old, write: 1'b1};
        if (cmd.csr == CSR_MSCRATCH) scratch_q <= newv;
      end
    end
  end

  assign res_valid = res_valid_q;
  assign res       = res_q;
endmodule
