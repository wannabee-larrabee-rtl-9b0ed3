// interrupt_controller: collects the exceptions of the cores of one vector unit for
// the supervisor. A core's exception (undefined instruction, access outside its
// scratchpad, or ecall/ebreak) sets its pending bit and records the cause and the
// pc or address that goes with it; irq is high while any enabled bit is pending.
// The supervisor reads pending/cause/info and clears bits by writing ones to clear
// (clr_en, clr_mask); a new exception in the same cycle as its clear wins. Enabling
// per core (enable) and the level-sensitive irq are this implementation's choices.
module interrupt_controller
  import gecko_pkg::*;
#(
  parameter int unsigned NCORES = 11
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              exc_valid [NCORES],
  input  exc_cause_e        exc_cause [NCORES],
  input  logic [31:0]       exc_info  [NCORES],
  input  logic [NCORES-1:0] enable,
  input  logic              clr_en,
  input  logic [NCORES-1:0] clr_mask,
  output logic [NCORES-1:0] pending,
  output exc_cause_e        cause     [NCORES],
  output logic [31:0]       info      [NCORES],
  output logic              irq
);
  for (genvar i = 0; i < NCORES; i++) begin : g_core
    always_ff @(posedge clk) begin
      if (rst) begin
        pending[i] <= 1'b0;
        cause[i]   <= EXC_NONE;
        info[i]    <= '0;
      end else if (exc_valid[i]) begin
        pending[i] <= 1'b1;
        cause[i]   <= exc_cause[i];
        info[i]    <= exc_info[i];
      end else if (clr_en && clr_mask[i]) begin
        pending[i] <= 1'b0;
      end
    end
  end

  assign irq = |(pending & enable);
endmodule
