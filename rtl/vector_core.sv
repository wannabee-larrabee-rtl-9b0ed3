// vector_core: one vector core of a vector unit: a gecko_core (integer pipeline,
// scalar FPU, 16-lane VPU) with its private instruction and data scratchpads. Each
// scratchpad is dual-ported: the core owns one port, the supervisor side the other,
// so the supervisor can load programs and move data while the core runs. The core
// never writes its own instruction memory.
// Sizes: IMEM_WORDS and DMEM_WORDS 32-bit words (the source design calls both
// memories small without giving sizes; 4 KiB and 16 KiB are this implementation's
// defaults). Addresses on both sides are byte addresses starting at 0 in each memory.
// core_rst holds the core in reset (the memories keep their contents); out of reset
// it starts at instruction address 0.
module vector_core
  import gecko_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] hart_id,
  input  logic        core_rst,
  // Supervisor port of the instruction memory
  input  logic        sup_i_en,
  input  logic [3:0]  sup_i_we,
  input  logic [31:0] sup_i_addr,
  input  logic [31:0] sup_i_wdata,
  output logic [31:0] sup_i_rdata,
  // Supervisor port of the data memory
  input  logic        sup_d_en,
  input  logic [3:0]  sup_d_we,
  input  logic [31:0] sup_d_addr,
  input  logic [31:0] sup_d_wdata,
  output logic [31:0] sup_d_rdata,
  // Exception to the interrupt controller
  output logic        exc_valid,
  output exc_cause_e  exc_cause,
  output logic [31:0] exc_info,
  output logic        halted
);
  logic        imem_en;
  logic [31:0] imem_addr, imem_rdata;
  logic        dmem_en;
  logic [3:0]  dmem_we;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;


  gecko_core #(.DMEM_BYTES(DMEM_WORDS * 4)) u_core (
    .clk, .hart_id, .rst(core_rst),
    .imem_en, .imem_addr, .imem_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .exc_valid, .exc_cause, .exc_info, .halted
  );

  scratchpad #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .a_en(imem_en), .a_we(4'b0000), .a_addr(imem_addr), .a_wdata(32'd0), .a_rdata(imem_rdata),
    .b_en(sup_i_en), .b_we(sup_i_we), .b_addr(sup_i_addr), .b_wdata(sup_i_wdata), .b_rdata(sup_i_rdata)
  );

  scratchpad #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .a_en(dmem_en), .a_we(dmem_we), .a_addr(dmem_addr), .a_wdata(dmem_wdata), .a_rdata(dmem_rdata),
    .b_en(sup_d_en), .b_we(sup_d_we), .b_addr(sup_d_addr), .b_wdata(sup_d_wdata), .b_rdata(sup_d_rdata)
  );
endmodule
