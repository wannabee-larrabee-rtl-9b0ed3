// wannabee_top: the accelerator fabric: NUNITS vector units side by side, each a group
// of NCORES RISC-V (RV32I + single-precision FP + 16-lane vector) cores with private
// instruction and data scratchpads. A supervisor processor (an ARM core running Linux
// in the source system) dispatches work: it writes programs through each unit's
// replicating instruction bus, moves data through the per-core data-memory ports,
// releases cores from reset, polls their data memories for status and services their
// exceptions through the interrupt controllers. The supervisor, the AXI interconnect
// and the DMA engines are vendor parts and are not included; their connection points
// are the ports of this module, indexed [unit] and [unit][core].
// Defaults: 2 units x 11 cores = 22 vector cores, the number the source design
// estimates for its smaller FPGA (the split into two units is this implementation's).
module wannabee_top
  import gecko_pkg::*;
#(
  parameter int unsigned NUNITS     = 2,
  parameter int unsigned NCORES     = 11,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 4096
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              i_en         [NUNITS],
  input  logic [3:0]        i_we         [NUNITS],
  input  logic [31:0]       i_addr       [NUNITS],
  input  logic [31:0]       i_wdata      [NUNITS],
  input  logic [NCORES-1:0] i_mask       [NUNITS],
  output logic [31:0]       i_rdata      [NUNITS],
  input  logic              d_en         [NUNITS][NCORES],
  input  logic [3:0]        d_we         [NUNITS][NCORES],
  input  logic [31:0]       d_addr       [NUNITS][NCORES],
  input  logic [31:0]       d_wdata      [NUNITS][NCORES],
  output logic [31:0]       d_rdata      [NUNITS][NCORES],
  input  logic              rst_we       [NUNITS],
  input  logic [NCORES-1:0] rst_wdata    [NUNITS],
  output logic [NCORES-1:0] rst_mask     [NUNITS],
  input  logic [NCORES-1:0] irq_enable   [NUNITS],
  input  logic              irq_clr_en   [NUNITS],
  input  logic [NCORES-1:0] irq_clr_mask [NUNITS],
  output logic [NCORES-1:0] irq_pending  [NUNITS],
  output exc_cause_e        irq_cause    [NUNITS][NCORES],
  output logic [31:0]       irq_info     [NUNITS][NCORES],
  output logic              irq          [NUNITS],
  output logic [NCORES-1:0] halted       [NUNITS]
);
  for (genvar u = 0; u < NUNITS; u++) begin : g_unit
    vector_unit #(
      .NCORES(NCORES), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)
    ) u_unit (
      .clk, .unit_id(8'(u)), .rst,
      .i_en(i_en[u]), .i_we(i_we[u]), .i_addr(i_addr[u]), .i_wdata(i_wdata[u]),
      .i_mask(i_mask[u]), .i_rdata(i_rdata[u]),
      .d_en(d_en[u]), .d_we(d_we[u]), .d_addr(d_addr[u]), .d_wdata(d_wdata[u]), .d_rdata(d_rdata[u]),
      .rst_we(rst_we[u]), .rst_wdata(rst_wdata[u]), .rst_mask(rst_mask[u]),
      .irq_enable(irq_enable[u]), .irq_clr_en(irq_clr_en[u]), .irq_clr_mask(irq_clr_mask[u]),
      .irq_pending(irq_pending[u]), .irq_cause(irq_cause[u]), .irq_info(irq_info[u]),
      .irq(irq[u]), .halted(halted[u])
    );
  end
endmodule
