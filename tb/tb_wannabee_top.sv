// tb_wannabee_top: end-to-end test of the accelerator at its default size (2 vector
// units x 11 cores = 22 cores), acting as the supervisor processor would:
//  1. loads the Mandelbrot program into every core at once through each unit's
//     replicating instruction bus (all-cores mask) and reads one word back;
//  2. gives every core its own pixels through its data-memory port;
//  3. releases all cores through the reset controllers, polls the done flags and
//     compares every pixel's iteration count, the square root and the vector result
//     with the reference model;
//  4. checks that every core raised an ecall interrupt and clears them;
//  5. replaces one instruction of a single core (single-core mask) with a misaligned
//     load, checks the memory-fault interrupt and that the other cores kept the
//     original word, then recovers that core by reset, restores the word and re-runs it.
// Monitors count the mechanisms through hierarchical references: decode hazard stalls,
// uses of the saved Execute result, wrong-path instructions killed in Execute,
// writeback port contention, FP and vector operations, divide/square-root runs,
// replicated instruction writes, interrupts and core resets. A mechanism that never
// occurs counts as a failure. The parameters (2 x 11) match the module defaults; the
// top is instantiated without overrides.
module tb_wannabee_top;
  import gecko_pkg::*;
  import mandel_pkg::*;
  import rv_asm_pkg::*;

  localparam int NU = 2, NC = 11, NPIX = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              i_en [NU];
  logic [3:0]        i_we [NU];
  logic [31:0]       i_addr [NU], i_wdata [NU], i_rdata [NU];
  logic [NC-1:0]     i_mask [NU];
  logic              d_en [NU][NC];
  logic [3:0]        d_we [NU][NC];
  logic [31:0]       d_addr [NU][NC], d_wdata [NU][NC], d_rdata [NU][NC];
  logic              rst_we [NU];
  logic [NC-1:0]     rst_wdata [NU], rst_mask [NU];
  logic [NC-1:0]     irq_enable [NU], irq_clr_mask [NU], irq_pending [NU], halted [NU];
  logic              irq_clr_en [NU], irq [NU];
  exc_cause_e        irq_cause [NU][NC];
  logic [31:0]       irq_info [NU][NC];

  wannabee_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- mechanism monitors
  int n_stall [NU*NC], n_saved [NU*NC], n_kill [NU*NC], n_wbwait [NU*NC];
  int n_fpu [NU*NC], n_vpu [NU*NC], n_div [NU*NC], n_exc [NU*NC];
  int n_repl = 0, n_irq = 0, n_rst = 0;

  for (genvar u = 0; u < NU; u++) begin : g_mu
    for (genvar c = 0; c < NC; c++) begin : g_mc
      always @(posedge clk) begin
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.in_valid &&
            !dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.hazard_ok &&
            !dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.halted_q)
          n_stall[u*NC+c]++;
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.issue &&
            (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.rs1_fwd ||
             dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_decode.rs2_fwd))
          n_saved[u*NC+c]++;
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_execute.ex_valid &&
            dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_execute.ex_ready &&
            dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_execute.killed)
          n_kill[u*NC+c]++;
        for (int s = 0; s < 5; s++)
          if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_writeback.in_valid[s] &&
              !dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_writeback.in_ready[s])
            n_wbwait[u*NC+c]++;
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_fpu.op_done) n_fpu[u*NC+c]++;
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_vpu.op_done) n_vpu[u*NC+c]++;
        if (dut.g_unit[u].u_unit.g_core[c].u_core.u_core.u_fpu.ds_start) n_div[u*NC+c]++;
        if (!rst && dut.g_unit[u].u_unit.exc_valid[c]) n_exc[u*NC+c]++;
      end
    end
    logic irq_q = 0;
    always @(posedge clk) begin
      int nw;
      nw = 0;
      for (int c = 0; c < NC; c++)
        if (dut.g_unit[u].u_unit.ci_en[c] && dut.g_unit[u].u_unit.ci_we[c] != 0) nw++;
      if (nw > 1) n_repl++;
      irq_q <= irq[u];
      if (irq[u] && !irq_q) n_irq++;
      if (rst_we[u]) n_rst++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- supervisor actions
  task automatic idle_all();
    for (int u = 0; u < NU; u++) begin
      i_en[u] = 0; i_we[u] = 0; rst_we[u] = 0; irq_clr_en[u] = 0;
      for (int c = 0; c < NC; c++) begin d_en[u][c] = 0; d_we[u][c] = 0; end
    end
  endtask

  task automatic iwrite(int u, logic [NC-1:0] mask, int addr, logic [31:0] v);
    @(negedge clk);
    idle_all();
    i_en[u] = 1; i_we[u] = 4'hf; i_mask[u] = mask; i_addr[u] = addr; i_wdata[u] = v;
    @(negedge clk);
    idle_all();
  endtask

  task automatic iread(int u, logic [NC-1:0] mask, int addr, output logic [31:0] v);
    @(negedge clk);
    idle_all();
    i_en[u] = 1; i_we[u] = 0; i_mask[u] = mask; i_addr[u] = addr;
    @(negedge clk);
    idle_all();
    @(negedge clk);
    v = i_rdata[u];
  endtask

  task automatic dwrite(int u, int c, int addr, logic [31:0] v);
    @(negedge clk);
    idle_all();
    d_en[u][c] = 1; d_we[u][c] = 4'hf; d_addr[u][c] = addr; d_wdata[u][c] = v;
    @(negedge clk);
    idle_all();
  endtask

  // Read the same address from every core in one cycle
  logic [31:0] rd_all [NU][NC];
  task automatic dread_all(int addr);
    @(negedge clk);
    idle_all();
    for (int u = 0; u < NU; u++)
      for (int c = 0; c < NC; c++) begin d_en[u][c] = 1; d_addr[u][c] = addr; end
    @(negedge clk);
    idle_all();
    for (int u = 0; u < NU; u++)
      for (int c = 0; c < NC; c++) rd_all[u][c] = d_rdata[u][c];
  endtask

  task automatic set_reset(int u, logic [NC-1:0] m);
    @(negedge clk);
    idle_all();
    rst_we[u] = 1; rst_wdata[u] = m;
    @(negedge clk);
    idle_all();
  endtask

  task automatic clear_irq(int u, logic [NC-1:0] m);
    @(negedge clk);
    idle_all();
    irq_clr_en[u] = 1; irq_clr_mask[u] = m;
    @(negedge clk);
    idle_all();
  endtask

  function automatic bit all_done();
    for (int u = 0; u < NU; u++)
      for (int c = 0; c < NC; c++) if (rd_all[u][c] != 1) return 0;
    return 1;
  endfunction

  task automatic wait_done(int max_polls);
    int p;
    p = 0;
    do begin
      repeat (50) @(negedge clk);
      dread_all(8);
      p++;
    end while (!all_done() && p < max_polls);
    checks++;
    if (!all_done()) begin failures++; $display("cores did not finish"); end
  endtask

  task automatic check_results(int u, int c);
    int k;
    logic [31:0] exp;
    k = u * NC + c;
    for (int i = 0; i < NPIX; i++) begin
      dread_all(512 + 4 * i);
      exp = ref_iters(pixel_cx(k, NPIX, i), pixel_cy(k, NPIX, i));
      checks++;
      if (rd_all[u][c] != exp) begin
        failures++;
        $display("unit %0d core %0d pixel %0d: %0d iterations, expected %0d", u, c, i, rd_all[u][c], exp);
      end
    end
    dread_all(4);
    checks++; if (rd_all[u][c] != 32'h4000_0000) begin failures++; $display("sqrt result %h", rd_all[u][c]); end
    dread_all(12);
    checks++; if (rd_all[u][c] != 32'h4160_0000) begin failures++; $display("vector result %h", rd_all[u][c]); end
  endtask

  logic [31:0] prog [256];
  logic [31:0] v;
  int n;
  localparam int FU = 1, FC = 5;   // the core that receives the faulting instruction

  initial begin
    for (int u = 0; u < NU; u++) begin
      i_addr[u] = 0; i_wdata[u] = 0; i_mask[u] = 0; rst_wdata[u] = 0;
      irq_enable[u] = '1; irq_clr_mask[u] = 0;
      for (int c = 0; c < NC; c++) begin d_addr[u][c] = 0; d_wdata[u][c] = 0; end
    end
    idle_all();
    repeat (4) @(negedge clk);
    rst = 0;

    // all cores start held in reset
    checks++; if (rst_mask[0] != '1 || rst_mask[1] != '1) failures++;

    // 1. program, replicated to every core of each unit
    n = build(prog);
    for (int u = 0; u < NU; u++)
      for (int i = 0; i < n; i++) iwrite(u, '1, 4 * i, prog[i]);
    iread(0, NC'(1) << 7, 4 * 3, v);
    checks++; if (v != prog[3]) failures++;

    // 2. pixels, all cores in parallel
    for (int a = 0; a < 2 + 2 * NPIX; a++) begin
      @(negedge clk);
      idle_all();
      for (int u = 0; u < NU; u++)
        for (int c = 0; c < NC; c++) begin
          d_en[u][c] = 1; d_we[u][c] = 4'hf;
          if (a == 0)      begin d_addr[u][c] = 0; d_wdata[u][c] = NPIX; end
          else if (a == 1) begin d_addr[u][c] = 8; d_wdata[u][c] = 0; end
          else begin
            d_addr[u][c]  = 16 + 4 * (a - 2);
            d_wdata[u][c] = (a % 2 == 0) ? pixel_cx(u * NC + c, NPIX, (a - 2) / 2)
                                         : pixel_cy(u * NC + c, NPIX, (a - 2) / 2);
          end
        end
    end
    @(negedge clk);
    idle_all();

    // 3. release and run
    for (int u = 0; u < NU; u++) set_reset(u, '0);
    wait_done(200);
    repeat (20) @(negedge clk);
    for (int u = 0; u < NU; u++)
      for (int c = 0; c < NC; c++) check_results(u, c);

    // 4. every core ended with ecall
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (irq_pending[u] != '1 || !irq[u] || halted[u] != '1) failures++;
      for (int c = 0; c < NC; c++) begin
        checks++; if (irq_cause[u][c] != EXC_ECALL) failures++;
      end
      clear_irq(u, '1);
      checks++; if (irq_pending[u] != '0 || irq[u]) failures++;
    end

    // 5. one core gets a faulting instruction
    set_reset(FU, NC'(1) << FC);
    iwrite(FU, NC'(1) << FC, 0, lw(2, 0, 2));       // misaligned load
    dwrite(FU, FC, 8, 0);
    for (int i = 0; i < NPIX; i++) dwrite(FU, FC, 512 + 4 * i, 32'hdead);
    iread(FU, NC'(1) << (FC + 1), 0, v);
    checks++; if (v != prog[0]) failures++;        // neighbour unchanged
    iread(FU, NC'(1) << FC, 0, v);
    checks++; if (v != lw(2, 0, 2)) failures++;
    set_reset(FU, '0);
    repeat (40) @(negedge clk);
    checks++;
    if (!irq[FU] || irq_pending[FU] != (NC'(1) << FC) || irq_cause[FU][FC] != EXC_MEMORY ||
        irq_info[FU][FC] != 32'd2 || !halted[FU][FC]) begin
      failures++;
      $display("fault: irq %b pending %b cause %0d info %h", irq[FU], irq_pending[FU],
               irq_cause[FU][FC], irq_info[FU][FC]);
    end
    checks++; if (irq[0]) failures++;

    // recover it: reset, restore the instruction, clear the interrupt, run again
    set_reset(FU, NC'(1) << FC);
    iwrite(FU, NC'(1) << FC, 0, prog[0]);
    clear_irq(FU, NC'(1) << FC);
    set_reset(FU, '0);
    wait_done(200);
    repeat (20) @(negedge clk);
    check_results(FU, FC);
    checks++; if (irq_cause[FU][FC] != EXC_ECALL || !irq[FU]) failures++;

    // 6. mechanism counts
    begin
      int s_stall, s_saved, s_kill, s_wb, s_fpu, s_vpu, s_div, s_exc;
      s_stall = 0; s_saved = 0; s_kill = 0; s_wb = 0; s_fpu = 0; s_vpu = 0; s_div = 0; s_exc = 0;
      for (int k = 0; k < NU * NC; k++) begin
        s_stall += n_stall[k]; s_saved += n_saved[k]; s_kill += n_kill[k]; s_wb += n_wbwait[k];
        s_fpu += n_fpu[k]; s_vpu += n_vpu[k]; s_div += n_div[k]; s_exc += n_exc[k];
        checks++; if (n_fpu[k] == 0 || n_vpu[k] == 0) failures++;   // every core did FP and vector work
      end
      $display("decode hazard stall cycles   %0d", s_stall);
      $display("saved-result operand uses    %0d", s_saved);
      $display("wrong-path kills             %0d", s_kill);
      $display("writeback port waits         %0d", s_wb);
      $display("FP operations                %0d", s_fpu);
      $display("vector operations            %0d", s_vpu);
      $display("divide/square-root runs      %0d", s_div);
      $display("core exceptions              %0d", s_exc);
      $display("replicated instruction writes %0d", n_repl);
      $display("interrupt assertions         %0d", n_irq);
      $display("reset-controller writes      %0d", n_rst);
      checks++; if (s_stall == 0) failures++;
      checks++; if (s_saved == 0) failures++;
      checks++; if (s_kill == 0) failures++;
      checks++; if (s_wb == 0) failures++;
      checks++; if (s_div != 2 * (NU * NC + 1)) failures++;
      checks++; if (s_exc != NU * NC + 2) begin failures++; for (int k = 0; k < NU * NC; k++) $display("core %0d exceptions %0d", k, n_exc[k]); end
      checks++; if (n_repl != NU * n + 0) failures++;
      checks++; if (n_irq < 3) failures++;
      checks++; if (n_rst != NU + 4) failures++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
