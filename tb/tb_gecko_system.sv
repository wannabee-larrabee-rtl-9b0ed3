// tb_gecko_system: checks the CSR unit: mhartid, mscratch read/write/set/clear with
// the old value returned, the cycle counter advancing by the number of elapsed
// cycles, the FP and vector operation counters counting their pulses, read-only
// counters ignoring writes, and Writeback back-pressure holding the result.
module tb_gecko_system;
  import gecko_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, res_valid, res_ready, fpu_op_done, vpu_op_done;
  gecko_sys_command_t cmd;
  gecko_reg_result_t res;
  int checks = 0, failures = 0;

  gecko_system dut (.hart_id(32'd9), .*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic csr(logic [1:0] op, logic [11:0] addr, logic [31:0] v, output logic [31:0] old, input int hold = 0);
    @(negedge clk);
    cmd = '{op: op, csr: addr, value: v, rd: 5'd12};
    cmd_valid = 1;
    res_ready = (hold == 0);
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
    repeat (hold) begin
      @(posedge clk); #1;
      checks++; if (!res_valid) failures++;
      if (!cmd_ready) checks++;
    end
    res_ready = 1;
    while (!res_valid) @(posedge clk);
    old = res.value;
    checks++;
    if (res.rd != 5'd12) failures++;
    @(posedge clk);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  logic [31:0] v, c0, c1;
  int t0, t1;

  initial begin
    cmd_valid = 0; cmd = '0; res_ready = 1; fpu_op_done = 0; vpu_op_done = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    csr(2'd2, CSR_MHARTID, 0, v); expect_eq("mhartid", v, 9);
    csr(2'd1, CSR_MSCRATCH, 32'hf0f0_1234, v);
    csr(2'd2, CSR_MSCRATCH, 32'h0000_000f, v); expect_eq("scratch write", v, 32'hf0f0_1234);
    csr(2'd3, CSR_MSCRATCH, 32'hf000_0000, v); expect_eq("scratch set", v, 32'hf0f0_123f);
    csr(2'd2, CSR_MSCRATCH, 0, v, 3);          expect_eq("scratch clear", v, 32'h00f0_123f);
    csr(2'd2, CSR_CYCLE, 0, c0); t0 = $time;
    repeat (17) @(posedge clk);
    csr(2'd2, CSR_CYCLE, 0, c1); t1 = $time;
    expect_eq("cycle count", c1 - c0, 32'((t1 - t0) / 10));
    csr(2'd1, CSR_CYCLE, 0, v);
    csr(2'd2, CSR_CYCLE, 0, v);
    checks++; if (v < c1) failures++;      // not writable
    @(negedge clk); fpu_op_done = 1; repeat (5) @(negedge clk); fpu_op_done = 0;
    vpu_op_done = 1; repeat (3) @(negedge clk); vpu_op_done = 0;
    csr(2'd2, CSR_FPOPS, 0, v);  expect_eq("fp ops", v, 5);
    csr(2'd2, CSR_VECOPS, 0, v); expect_eq("vec ops", v, 3);
    csr(2'd2, 12'h7ff, 0, v);    expect_eq("unknown", v, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
