// scratchpad: dual-port block-RAM scratchpad used for both the instruction memory
// and the data memory of a vector core. Port A belongs to the core, port B to the
// supervisor side (the interconnect or the instruction replicator), so the supervisor
// can read and write while the core runs. Both ports are 32 bits wide with byte write
// enables and a byte address; a read returns data one cycle after the enable and the
// read data register holds its value while the port is not enabled (block-RAM output
// register behaviour, which the pipeline relies on to stall). A read and a write of
// the same word on the two ports in the same cycle return the old data. The memory
// contents are not initialised.
module scratchpad #(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic [3:0]  a_we,
  input  logic [31:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        b_en,
  input  logic [3:0]  b_we,
  input  logic [31:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] a_idx, b_idx;

  assign a_idx = a_addr[AW+1:2];
  assign b_idx = b_addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_idx];
      for (int i = 0; i < 4; i++) if (a_we[i]) mem[a_idx][8*i +: 8] <= a_wdata[8*i +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_idx];
      for (int i = 0; i < 4; i++) if (b_we[i]) mem[b_idx][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end
endmodule
