// tb_gecko_core: runs small RV32I/F/V programs on the gecko core with behavioural
// one-cycle instruction and data memories, then checks the data memory, the exception
// the program ends with, and the CSR operation counters. The first program exercises
// the ALU, back-to-back dependent instructions (Execute's saved result), loads with
// sign/zero extension and a load-use dependence, byte stores, a loop with a
// backward branch, taken and not-taken branches with wrong-path instructions that
// must be discarded, jal/jalr, CSRs, the FPU (conversion, multiply, divide, fused
// multiply-add, compare) and the vector unit, and ends with ecall. Two more runs
// check that an out-of-range load and an undefined instruction halt the core with
// the right cause.
module tb_gecko_core;
  import gecko_pkg::*;
  import rv_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        imem_en, dmem_en, exc_valid, halted;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, exc_info;
  logic [3:0]  dmem_we;
  exc_cause_e  exc_cause;
  int checks = 0, failures = 0;

  logic [31:0] imem [256];
  logic [31:0] dmem [1024];

  gecko_core #(.DMEM_BYTES(4096)) dut (.hart_id(32'd5), .*);

  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= imem[imem_addr[9:2]];
    if (dmem_en) begin
      dmem_rdata <= dmem[dmem_addr[11:2]];
      for (int i = 0; i < 4; i++) if (dmem_we[i]) dmem[dmem_addr[11:2]][8*i +: 8] <= dmem_wdata[8*i +: 8];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pc;
  function automatic void emit(logic [31:0] w);
    imem[pc] = w;
    pc++;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  exc_cause_e  seen_cause;
  logic [31:0] seen_info;
  int          cycles;

  task automatic run_until_exception();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cycles = 0;
    while (!exc_valid) begin @(posedge clk); #1 cycles++; end
    seen_cause = exc_cause;
    seen_info  = exc_info;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    foreach (dmem[i]) dmem[i] = 32'd0;
    foreach (imem[i]) imem[i] = 32'd0;
    pc = 0;
    emit(addi(1, 0, 11));
    emit(addi(2, 0, 0));
    emit(addi(3, 0, 1));
    emit(add(2, 2, 3));          // loop: sum += i
    emit(addi(3, 3, 1));
    emit(bne(3, 1, -8));
    emit(sw(2, 0, 0));           // [0] = 55
    emit(addi(4, 0, -5));
    emit(srai(5, 4, 1));         // -3, uses Execute's saved result
    emit(sw(5, 0, 4));           // [4] = -3
    emit(lui(6, 20'h12345));
    emit(addi(6, 6, 'h678));
    emit(sw(6, 0, 8));           // [8] = 0x12345678
    emit(lb(7, 0, 9));           // 0x56
    emit(lhu(8, 0, 10));         // 0x1234
    emit(add(9, 7, 8));          // load-use
    emit(sw(9, 0, 12));          // [12] = 0x128a
    emit(sb(4, 0, 17));          // [16] = 0x0000fb00
    emit(addi(11, 0, 7));
    emit(jal(10, 8));            // pc 19*4 = 76 -> 84, x10 = 80
    emit(addi(11, 0, 99));       // wrong path
    emit(sw(10, 0, 20));         // [20] = 80
    emit(sw(11, 0, 24));         // [24] = 7
    emit(auipc(12, 0));          // pc 92
    emit(addi(12, 12, 16));      // 108
    emit(jalr(13, 12, 0));       // pc 100 -> 108, x13 = 104
    emit(addi(11, 0, 55));       // wrong path
    emit(csrrs(14, 12'hF14, 0)); // pc 108: mhartid = 5
    emit(sw(13, 0, 28));         // [28] = 104
    emit(sw(14, 0, 32));         // [32] = 5
    emit(sw(11, 0, 36));         // [36] = 7
    emit(csrrw(0, 12'h340, 6));
    emit(csrrs(16, 12'h340, 0));
    emit(sw(16, 0, 40));         // [40] = 0x12345678
    emit(addi(17, 0, 3));
    emit(fcvt_s_w(1, 17));       // 3.0
    emit(addi(18, 0, 4));
    emit(fcvt_s_w(2, 18));       // 4.0
    emit(fmul(3, 1, 2));         // 12.0
    emit(fdiv(4, 3, 2));         // 3.0
    emit(fmadd(5, 1, 2, 3));     // 24.0
    emit(fcvt_w_s(19, 5));
    emit(sw(19, 0, 44));         // [44] = 24
    emit(fmv_x_w(20, 4));
    emit(sw(20, 0, 48));         // [48] = 0x40400000
    emit(flt(21, 1, 2));
    emit(sw(21, 0, 52));         // [52] = 1
    emit(vsetvli(22, 0));
    emit(sw(22, 0, 56));         // [56] = 16
    emit(lui(23, 20'h40000));    // 2.0
    emit(vmv_v_x(1, 23));
    emit(lui(24, 20'h40400));    // 3.0
    emit(vmv_v_x(2, 24));
    emit(vfmul_vv(3, 1, 2));     // 6.0
    emit(vfmacc_vv(3, 1, 2));    // 12.0
    emit(vfadd_vv(4, 3, 1));     // 14.0
    emit(vmv_x_s(25, 4));
    emit(sw(25, 0, 60));         // [60] = 0x41600000
    emit(addi(26, 0, 2));
    emit(blt(4, 0, 8));          // taken
    emit(addi(26, 0, 1));        // wrong path
    emit(blt(0, 4, 8));          // not taken
    emit(addi(26, 26, 1));       // 3
    emit(sw(26, 0, 64));         // [64] = 3
    emit(csrrs(27, 12'hCC0, 0)); // FP operations so far: 8
    emit(csrrs(28, 12'hCC1, 0)); // vector operations so far: 6
    emit(sw(27, 0, 68));
    emit(sw(28, 0, 72));
    emit(ecall());
    rst = 1;
    run_until_exception();
    check("cause ecall", 32'(seen_cause), 32'(EXC_ECALL));
    check("ecall pc", seen_info, 32'((pc - 1) * 4));
    check("halted", 32'(halted), 1);
    check("sum loop", dmem[0], 55);
    check("srai", dmem[1], 32'hffff_fffd);
    check("lui/addi", dmem[2], 32'h1234_5678);
    check("load-use", dmem[3], 32'h128a);
    check("sb", dmem[4], 32'h0000_fb00);
    check("jal link", dmem[5], 80);
    check("jal skip", dmem[6], 7);
    check("jalr link", dmem[7], 104);
    check("mhartid", dmem[8], 5);
    check("jalr skip", dmem[9], 7);
    check("mscratch", dmem[10], 32'h1234_5678);
    check("fmadd/fcvt", dmem[11], 24);
    check("fdiv", dmem[12], 32'h4040_0000);
    check("flt", dmem[13], 1);
    check("vsetvli", dmem[14], 16);
    check("vector", dmem[15], 32'h4160_0000);
    check("branches", dmem[16], 3);
    check("fp op count", dmem[17], 8);
    check("vector op count", dmem[18], 6);
    $display("program 1: %0d cycles", cycles);

    // Out-of-range load
    pc = 0;
    emit(lui(1, 20'h10000));
    emit(lw(2, 1, 0));
    emit(addi(3, 0, 1));
    run_until_exception();
    check("cause memory", 32'(seen_cause), 32'(EXC_MEMORY));
    check("fault address", seen_info, 32'h1000_0000);

    // Undefined instruction, only after a mispredicted path is discarded
    pc = 0;
    emit(beq(0, 0, 8));
    emit(32'hffff_ffff);         // wrong path: must not trap
    emit(addi(1, 0, 1));
    emit(32'h0000_0000);         // undefined
    run_until_exception();
    check("cause illegal", 32'(seen_cause), 32'(EXC_ILLEGAL));
    check("illegal pc", seen_info, 12);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
