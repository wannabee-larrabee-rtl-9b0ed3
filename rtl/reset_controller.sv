// reset_controller: per-core reset register of a vector unit. The supervisor writes a
// mask with one bit per core; a set bit holds that core in reset. All cores come out
// of system reset held in reset, so the supervisor loads their programs first and then
// releases them; a core that has faulted is recovered by setting and clearing its bit.
// Interface: a write (we, wdata) takes effect on the next clock edge; mask reads the
// register back. core_rst[i] is registered, so a core leaves reset one cycle after the
// write that clears its bit and enters reset one cycle after the write that sets it.
module reset_controller #(
  parameter int unsigned NCORES = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [NCORES-1:0] wdata,
  output logic [NCORES-1:0] mask,
  output logic [NCORES-1:0] core_rst
);
  always_ff @(posedge clk) begin
    if (rst)     mask <= '1;
    else if (we) mask <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) core_rst <= '1;
    else     core_rst <= we ? wdata : mask;
  end
endmodule
