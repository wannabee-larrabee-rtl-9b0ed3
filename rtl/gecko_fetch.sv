// gecko_fetch: Fetch stage of the gecko integer pipeline. It holds the program
// counter, reads the instruction scratchpad (one cycle of latency) and presents
// {instruction, pc, epoch} to Decode with valid/ready flow control. The scratchpad
// keeps its read data while its enable is low, so a stalled instruction simply stays
// on the memory output. Branches are predicted not taken: fetch runs sequentially
// until a jump command arrives from Execute (no flow control). A jump redirects the
// PC, drops the instruction in flight and advances the epoch, which lets Execute
// recognise and discard the wrong-path instructions already issued.
// After reset the PC starts at RESET_PC, the first word of the instruction memory.
// imem_addr is a byte address.
module gecko_fetch
  import gecko_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                halt,        // stop fetching (core has raised an exception)
  // Instruction memory port
  output logic                imem_en,
  output logic [31:0]         imem_addr,
  input  logic [31:0]         imem_rdata,
  // To Decode
  output logic                out_valid,
  input  logic                out_ready,
  output logic [31:0]         out_instr,
  output logic [31:0]         out_pc,
  output epoch_t              out_epoch,
  // From Execute
  input  logic                jump_valid,
  input  gecko_jump_command_t jump
);
  logic [31:0] pc_q, resp_pc_q;
  logic        resp_valid_q;
  epoch_t      epoch_q;
  logic        advance;

  assign advance   = (!resp_valid_q || out_ready) && !halt;
  assign imem_en   = advance && !jump_valid;
  assign imem_addr = pc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q         <= RESET_PC;
      resp_pc_q    <= '0;
      resp_valid_q <= 1'b0;
      epoch_q      <= '0;
    end else if (jump_valid) begin
      pc_q         <= jump.target;
      resp_valid_q <= 1'b0;
      epoch_q      <= epoch_q + 1'b1;
    end else if (advance) begin
      pc_q         <= pc_q + 32'd4;
      resp_pc_q    <= pc_q;
      resp_valid_q <= 1'b1;
    end else if (out_ready) begin
      resp_valid_q <= 1'b0;                  // halted: drain the last instruction
    end
  end

  assign out_valid = resp_valid_q;
  assign out_instr = imem_rdata;
  assign out_pc    = resp_pc_q;
  assign out_epoch = epoch_q;
endmodule
