// gecko_writeback: Writeback stage of the gecko integer pipeline. The integer
// register file has a single write port, but results arrive on several streams: the
// register-to-register results forwarded from Execute past Memory, load results from
// Memory, CSR reads from System Management, and integer results of the FPU and the
// vector unit. Writeback accepts one stream per cycle, in any order, and registers it
// as the write (and register-valid release) for Decode in the next cycle.
// Arbitration is a fixed priority, lowest index first; the priority order and the one
// cycle of write latency are this implementation's choices.
// Interface: in_valid/in_ready/in_result per stream; out_valid/out_result drive the
// register file write port and the register-valid bits in Decode.
module gecko_writeback
  import gecko_pkg::*;
#(
  parameter int unsigned STREAMS = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid  [STREAMS],
  output logic              in_ready  [STREAMS],
  input  gecko_reg_result_t in_result [STREAMS],
  output logic              out_valid,
  output gecko_reg_result_t out_result
);
  logic                    found;
  logic [$clog2(STREAMS)-1:0] sel;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < STREAMS; i++) begin
      in_ready[i] = 1'b0;
      if (in_valid[i] && !found) begin
        found       = 1'b1;
        sel         = ($clog2(STREAMS))'(i);
        in_ready[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out_result <= '0;
    end else begin
      out_valid  <= found;
      out_result <= in_result[sel];
    end
  end
endmodule
