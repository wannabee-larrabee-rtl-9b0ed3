// tb_gecko_fetch: checks the Fetch stage with a one-cycle instruction memory whose
// word at byte address A is ~A. Decode's ready is toggled at random; every delivered
// instruction must match its pc, pcs must be sequential except after a jump, a jump
// must advance the epoch and redirect to its target, halt must stop delivery, and
// at least half of the 3000 cycles must deliver an instruction.
module tb_gecko_fetch;
  import gecko_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic imem_en, out_valid, out_ready, jump_valid, halt;
  logic [31:0] imem_addr, imem_rdata, out_instr, out_pc;
  epoch_t out_epoch;
  gecko_jump_command_t jump;
  int checks = 0, failures = 0, jumps = 0;

  gecko_fetch dut (.*);

  always_ff @(posedge clk) if (imem_en) imem_rdata <= ~imem_addr;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expect_pc;
  epoch_t      expect_epoch;
  logic        pending_jump;
  int          delivered = 0;

  initial begin
    out_ready = 0; jump_valid = 0; jump = '0; halt = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_pc = 0; expect_epoch = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      out_ready  = ($urandom % 4) != 0;
      jump_valid = ($urandom % 23) == 0;
      jump.target = {$urandom % 1024, 2'b00};
      @(posedge clk);
      if (jump_valid) begin
        expect_pc = jump.target;
        expect_epoch = expect_epoch + 1'b1;
        jumps++;
      end else if (out_valid && out_ready) begin
        checks++;
        delivered++;
        if (out_pc != expect_pc || out_instr != ~out_pc || out_epoch != expect_epoch) begin
          failures++;
          if (failures < 10) $display("pc %h exp %h instr %h epoch %0d/%0d", out_pc, expect_pc, out_instr, out_epoch, expect_epoch);
        end
        expect_pc = expect_pc + 4;
      end
    end
    // halt: after draining, no more valid instructions
    @(negedge clk);
    jump_valid = 0; halt = 1; out_ready = 1;
    repeat (3) @(posedge clk);
    repeat (10) begin
      @(posedge clk);
      checks++;
      if (out_valid || imem_en) failures++;
    end
    checks++;
    if (jumps < 10) failures++;
    // throughput: with ready high 3/4 of the time, most cycles must deliver
    checks++;
    if (delivered < 1500) begin failures++; $display("only %0d instructions delivered", delivered); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
