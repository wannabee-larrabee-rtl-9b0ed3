// tb_gecko_memory: checks the Memory stage against a byte-array model of the data
// scratchpad: random byte/half/word stores must set exactly the addressed bytes,
// loads must return the right bytes with sign or zero extension one cycle later,
// Writeback back-pressure must hold the load result, and misaligned or out-of-range
// accesses must raise the fault without touching memory.
module tb_gecko_memory;
  import gecko_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic mem_valid, mem_ready, dmem_en, wb_valid, wb_ready, exc_valid;
  gecko_mem_command_t mem_cmd;
  logic [3:0]  dmem_we;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata, exc_addr;
  gecko_reg_result_t wb_result;
  int checks = 0, failures = 0, faults = 0, loads = 0;

  gecko_memory #(.DMEM_BYTES(256)) dut (.*);

  logic [31:0] ram [64];
  logic [7:0]  model [256];
  always_ff @(posedge clk) if (dmem_en) begin
    dmem_rdata <= ram[dmem_addr[7:2]];
    for (int i = 0; i < 4; i++) if (dmem_we[i]) ram[dmem_addr[7:2]][8*i +: 8] <= dmem_wdata[8*i +: 8];
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_load(logic [2:0] f3, logic [31:0] addr);
    logic [31:0] w;
    w = {model[(addr & ~32'd3) + 3], model[(addr & ~32'd3) + 2], model[(addr & ~32'd3) + 1], model[addr & ~32'd3]};
    w = w >> (8 * addr[1:0]);
    case (f3)
      0: return {{24{w[7]}}, w[7:0]};
      1: return {{16{w[15]}}, w[15:0]};
      4: return {24'd0, w[7:0]};
      5: return {16'd0, w[15:0]};
      default: return w;
    endcase
  endfunction

  logic [31:0] exp;
  bit bad;
  int sz;

  initial begin
    foreach (ram[i]) ram[i] = 0;
    foreach (model[i]) model[i] = 0;
    mem_valid = 0; mem_cmd = '0; wb_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      mem_cmd.store  = $urandom % 2;
      mem_cmd.funct3 = mem_cmd.store ? 3'($urandom % 3) : 3'(int'($urandom % 5) + (($urandom % 5) > 2 ? 2 : 0));
      if (mem_cmd.funct3 == 3) mem_cmd.funct3 = 2;
      mem_cmd.addr   = (($urandom % 50) == 0) ? 32'h0000_0100 + $urandom % 64 : $urandom % 256;
      mem_cmd.data   = $urandom;
      mem_cmd.rd     = 5'($urandom);
      sz  = 1 << mem_cmd.funct3[1:0];
      bad = (mem_cmd.addr % sz) != 0 || mem_cmd.addr >= 256;
      exp = ref_load(mem_cmd.funct3, mem_cmd.addr);
      mem_valid = 1;
      #1;
      while (!mem_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 mem_valid = 0;
      checks++;
      if (exc_valid != bad) failures++;
      if (bad) begin
        faults++;
        if (exc_addr != mem_cmd.addr) failures++;
      end else if (mem_cmd.store) begin
        for (int i = 0; i < sz; i++) model[mem_cmd.addr + i] = mem_cmd.data[8*i +: 8];
      end else begin
        loads++;
        wb_ready = 0;
        repeat ($urandom % 3) @(posedge clk);
        #1;
        checks++;
        if (!wb_valid || wb_result.value != exp || wb_result.rd != mem_cmd.rd) begin
          failures++;
          if (failures < 10) $display("load f3=%0d addr %h got %h exp %h", mem_cmd.funct3, mem_cmd.addr, wb_result.value, exp);
        end
        wb_ready = 1;
        @(posedge clk);
      end
    end
    checks++;
    if (faults < 20 || loads < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
