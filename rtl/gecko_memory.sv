// gecko_memory: Memory stage of the gecko integer pipeline ("Memory Command" and the
// data scratchpad in the pipeline diagram). It turns a load/store command from Execute
// into a request on the core's port of the data scratchpad (byte enables for sb/sh/sw)
// and, one cycle later, aligns and sign- or zero-extends the loaded word and offers it
// to Writeback. The scratchpad holds its read data while its enable is low, so a load
// result waits on the memory output until Writeback takes it.
// An access outside the DMEM_BYTES scratchpad, or not aligned to its size, is not
// performed and raises exc_valid (the core then halts until the supervisor resets it).
// Timing: a command is accepted (mem_ready) when no load result is waiting or the
// waiting one is taken in the same cycle; load latency is one cycle.
module gecko_memory
  import gecko_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 16384
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               mem_valid,
  output logic               mem_ready,
  input  gecko_mem_command_t mem_cmd,
  // Data scratchpad, core port (byte address, word access)
  output logic               dmem_en,
  output logic [3:0]         dmem_we,
  output logic [31:0]        dmem_addr,
  output logic [31:0]        dmem_wdata,
  input  logic [31:0]        dmem_rdata,
  // Load results to Writeback
  output logic               wb_valid,
  input  logic               wb_ready,
  output gecko_reg_result_t  wb_result,
  // Access fault
  output logic               exc_valid,
  output logic [31:0]        exc_addr
);
  logic       pend_q;
  logic [4:0] pend_rd_q;
  logic [2:0] pend_f3_q;
  logic [1:0] pend_off_q;
  logic       bad, accept;
  logic [1:0] off;

  assign off = mem_cmd.addr[1:0];
  always_comb begin
    unique case (mem_cmd.funct3[1:0])
      2'b00:   bad = 1'b0;
      2'b01:   bad = off[0];
      default: bad = off != 2'b00;
    endcase
    if (mem_cmd.addr >= DMEM_BYTES) bad = 1'b1;
  end

  assign mem_ready = !pend_q || wb_ready;
  assign accept    = mem_valid && mem_ready && !bad;

  assign dmem_en    = accept;
  assign dmem_addr  = {mem_cmd.addr[31:2], 2'b00};
  assign dmem_wdata = mem_cmd.data << (8 * off);
  always_comb begin
    dmem_we = 4'b0000;
    if (mem_cmd.store && accept) begin
      unique case (mem_cmd.funct3[1:0])
        2'b00:   dmem_we = 4'b0001 << off;
        2'b01:   dmem_we = 4'b0011 << off;
        default: dmem_we = 4'b1111;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q     <= 1'b0;
      pend_rd_q  <= '0;
      pend_f3_q  <= '0;
      pend_off_q <= '0;
      exc_valid  <= 1'b0;
      exc_addr   <= '0;
    end else begin
      exc_valid <= mem_valid && mem_ready && bad;
      if (mem_valid && mem_ready && bad) exc_addr <= mem_cmd.addr;
      if (wb_ready) pend_q <= 1'b0;
      if (accept && !mem_cmd.store) begin
        pend_q     <= 1'b1;
        pend_rd_q  <= mem_cmd.rd;
        pend_f3_q  <= mem_cmd.funct3;
        pend_off_q <= off;
      end
    end
  end

  logic [31:0] shifted;
  assign shifted = dmem_rdata >> (8 * pend_off_q);
  always_comb begin
    unique case (pend_f3_q)
      3'b000:  wb_result.value = {{24{shifted[7]}}, shifted[7:0]};
      3'b001:  wb_result.value = {{16{shifted[15]}}, shifted[15:0]};
      3'b100:  wb_result.value = {24'd0, shifted[7:0]};
      3'b101:  wb_result.value = {16'd0, shifted[15:0]};
      default: wb_result.value = shifted;
    endcase
  end
  assign wb_valid        = pend_q;
  assign wb_result.rd    = pend_rd_q;
  assign wb_result.write = 1'b1;
endmodule
