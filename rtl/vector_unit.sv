// vector_unit: one vector unit (a group of vector cores) as in the system diagram:
// an instruction replicator that copies supervisor writes into the instruction
// memories of a masked set of cores, NCORES vector cores, an interrupt controller that
// gathers the cores' exceptions, and the per-core reset controller.
// The data memories' supervisor ports are brought out per core: in the full system
// they sit behind the vector unit's AXI interconnect and its DMA engine, which are
// vendor IP and not part of this RTL. All cores start held in reset.
// Default NCORES = 11: two units of eleven make up the estimated 22 vector cores
// that fit the smaller FPGA's DSP budget; the split into units is this
// implementation's choice.
module vector_unit
  import gecko_pkg::*;
#(
  parameter int unsigned NCORES     = 11,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 4096
) (
  input  logic              clk,
  input  logic [7:0]        unit_id,   // constant strap: first mhartid is unit_id * NCORES
  input  logic              rst,
  // Instruction bus (replicated)
  input  logic              i_en,
  input  logic [3:0]        i_we,
  input  logic [31:0]       i_addr,
  input  logic [31:0]       i_wdata,
  input  logic [NCORES-1:0] i_mask,
  output logic [31:0]       i_rdata,
  // Data memory supervisor ports, one per core
  input  logic              d_en    [NCORES],
  input  logic [3:0]        d_we    [NCORES],
  input  logic [31:0]       d_addr  [NCORES],
  input  logic [31:0]       d_wdata [NCORES],
  output logic [31:0]       d_rdata [NCORES],
  // Reset controller
  input  logic              rst_we,
  input  logic [NCORES-1:0] rst_wdata,
  output logic [NCORES-1:0] rst_mask,
  // Interrupt controller
  input  logic [NCORES-1:0] irq_enable,
  input  logic              irq_clr_en,
  input  logic [NCORES-1:0] irq_clr_mask,
  output logic [NCORES-1:0] irq_pending,
  output exc_cause_e        irq_cause [NCORES],
  output logic [31:0]       irq_info  [NCORES],
  output logic              irq,
  output logic [NCORES-1:0] halted
);
  logic              ci_en    [NCORES];
  logic [3:0]        ci_we    [NCORES];
  logic [31:0]       ci_addr  [NCORES];
  logic [31:0]       ci_wdata [NCORES];
  logic [31:0]       ci_rdata [NCORES];
  logic [NCORES-1:0] core_rst;
  logic              exc_valid [NCORES];
  exc_cause_e        exc_cause [NCORES];
  logic [31:0]       exc_info  [NCORES];

  insn_replicator #(.NCORES(NCORES)) u_replicator (
    .clk, .rst,
    .req_en(i_en), .req_we(i_we), .req_addr(i_addr), .req_wdata(i_wdata), .req_mask(i_mask),
    .rdata(i_rdata),
    .core_en(ci_en), .core_we(ci_we), .core_addr(ci_addr), .core_wdata(ci_wdata), .core_rdata(ci_rdata)
  );

  reset_controller #(.NCORES(NCORES)) u_reset (
    .clk, .rst, .we(rst_we), .wdata(rst_wdata), .mask(rst_mask), .core_rst
  );

  interrupt_controller #(.NCORES(NCORES)) u_irq (
    .clk, .rst,
    .exc_valid, .exc_cause, .exc_info,
    .enable(irq_enable), .clr_en(irq_clr_en), .clr_mask(irq_clr_mask),
    .pending(irq_pending), .cause(irq_cause), .info(irq_info), .irq
  );

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    vector_core #(
      .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)
    ) u_core (
      .clk, .hart_id(32'(unit_id) * NCORES + i), .core_rst(core_rst[i] || rst),
      .sup_i_en(ci_en[i]), .sup_i_we(ci_we[i]), .sup_i_addr(ci_addr[i]),
      .sup_i_wdata(ci_wdata[i]), .sup_i_rdata(ci_rdata[i]),
      .sup_d_en(d_en[i]), .sup_d_we(d_we[i]), .sup_d_addr(d_addr[i]),
      .sup_d_wdata(d_wdata[i]), .sup_d_rdata(d_rdata[i]),
      .exc_valid(exc_valid[i]), .exc_cause(exc_cause[i]), .exc_info(exc_info[i]),
      .halted(halted[i])
    );
  end
endmodule
