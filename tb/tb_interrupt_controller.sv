// tb_interrupt_controller: raises random core exceptions and supervisor clears and
// checks the pending bits, the recorded cause and info of each core, the priority of
// a new exception over a clear in the same cycle, and irq following the enabled
// pending bits.
module tb_interrupt_controller;
  import gecko_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         exc_valid [N];
  exc_cause_e   exc_cause [N];
  logic [31:0]  exc_info  [N];
  logic [N-1:0] enable, clr_mask, pending;
  logic         clr_en, irq;
  exc_cause_e   cause [N];
  logic [31:0]  info  [N];
  int checks = 0, failures = 0;

  interrupt_controller #(.NCORES(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] m_pending;
  exc_cause_e   m_cause [N];
  logic [31:0]  m_info  [N];

  initial begin
    for (int c = 0; c < N; c++) begin exc_valid[c] = 0; exc_cause[c] = EXC_NONE; exc_info[c] = 0; m_cause[c] = EXC_NONE; m_info[c] = 0; end
    enable = '1; clr_en = 0; clr_mask = 0; m_pending = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        exc_valid[c] = ($urandom % 6) == 0;
        exc_cause[c] = exc_cause_e'(1 + $urandom % 3);
        exc_info[c]  = $urandom;
      end
      clr_en = $urandom % 2; clr_mask = N'($urandom);
      enable = N'($urandom);
      @(posedge clk);
      for (int c = 0; c < N; c++) begin
        if (exc_valid[c]) begin m_pending[c] = 1; m_cause[c] = exc_cause[c]; m_info[c] = exc_info[c]; end
        else if (clr_en && clr_mask[c]) m_pending[c] = 0;
      end
      #1;
      checks++;
      if (pending != m_pending || irq != |(m_pending & enable)) failures++;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (m_pending[c] && (cause[c] != m_cause[c] || info[c] != m_info[c])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
