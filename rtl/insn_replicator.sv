// insn_replicator: the replicator between the supervisor's instruction bus and the
// instruction memories of the cores of one vector unit. A write is replicated to every
// core whose bit is set in the core mask, so a group of cores can be given the same
// program in one pass; a read goes to the lowest-numbered selected core and its data
// returns one cycle later on rdata.
// The source design builds this on AXI; this implementation uses a plain one-cycle
// request port (en, we byte mask, byte address, data, mask), which an AXI slave
// adapter would drive. Writes are fire-and-forget, with no back-pressure.
module insn_replicator #(
  parameter int unsigned NCORES = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_en,
  input  logic [3:0]        req_we,
  input  logic [31:0]       req_addr,
  input  logic [31:0]       req_wdata,
  input  logic [NCORES-1:0] req_mask,
  output logic [31:0]       rdata,
  // Per-core instruction-memory supervisor ports
  output logic              core_en    [NCORES],
  output logic [3:0]        core_we    [NCORES],
  output logic [31:0]       core_addr  [NCORES],
  output logic [31:0]       core_wdata [NCORES],
  input  logic [31:0]       core_rdata [NCORES]
);
  localparam int unsigned SW = (NCORES > 1) ? $clog2(NCORES) : 1;
  logic [SW-1:0] first, first_q;
  logic          is_read;

  assign is_read = (req_we == 4'b0000);

  always_comb begin
    first = '0;
    for (int i = NCORES - 1; i >= 0; i--) if (req_mask[i]) first = SW'(i);
  end

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    assign core_en[i]    = req_en && (is_read ? (first == SW'(i) && req_mask[i]) : req_mask[i]);
    assign core_we[i]    = req_we;
    assign core_addr[i]  = req_addr;
    assign core_wdata[i] = req_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)                    first_q <= '0;
    else if (req_en && is_read) first_q <= first;
  end

  assign rdata = core_rdata[first_q];
endmodule
