// tb_vector_unit: test of one vector unit with 3 cores and small memories. The
// Mandelbrot program is written once through the replicating instruction bus (mask
// 3'b111), each core gets its own pixels, the reset controller releases the cores,
// and the iteration counts are compared with the reference. Then checks: ecall
// interrupts from all cores and write-1-to-clear, a single-core write (mask 3'b010)
// that leaves the neighbours unchanged, a misaligned-load fault on core 1 reported as
// EXC_MEMORY with the address, and the recovery of that core by reset.
module tb_vector_unit;
  import gecko_pkg::*;
  import mandel_pkg::*;
  import rv_asm_pkg::*;

  localparam int NC = 3, NPIX = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              i_en, rst_we, irq_clr_en, irq;
  logic [3:0]        i_we;
  logic [31:0]       i_addr, i_wdata, i_rdata;
  logic [NC-1:0]     i_mask, rst_wdata, rst_mask, irq_enable, irq_clr_mask, irq_pending, halted;
  logic              d_en [NC];
  logic [3:0]        d_we [NC];
  logic [31:0]       d_addr [NC], d_wdata [NC], d_rdata [NC], irq_info [NC];
  exc_cause_e        irq_cause [NC];
  logic [7:0]        unit_id = 8'd1;

  vector_unit #(.NCORES(NC), .IMEM_WORDS(256), .DMEM_WORDS(1024)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    i_en = 0; i_we = 0; rst_we = 0; irq_clr_en = 0;
    for (int c = 0; c < NC; c++) begin d_en[c] = 0; d_we[c] = 0; end
  endtask
  task automatic iwrite(logic [NC-1:0] m, int a, logic [31:0] v);
    @(negedge clk); idle(); i_en = 1; i_we = 4'hf; i_mask = m; i_addr = a; i_wdata = v;
    @(negedge clk); idle();
  endtask
  task automatic iread(logic [NC-1:0] m, int a, output logic [31:0] v);
    @(negedge clk); idle(); i_en = 1; i_mask = m; i_addr = a;
    @(negedge clk); idle();
    @(negedge clk); v = i_rdata;
  endtask
  task automatic dwrite(int c, int a, logic [31:0] v);
    @(negedge clk); idle(); d_en[c] = 1; d_we[c] = 4'hf; d_addr[c] = a; d_wdata[c] = v;
    @(negedge clk); idle();
  endtask
  task automatic dread(int c, int a, output logic [31:0] v);
    @(negedge clk); idle(); d_en[c] = 1; d_addr[c] = a;
    @(negedge clk); idle(); v = d_rdata[c];
  endtask
  task automatic setrst(logic [NC-1:0] m);
    @(negedge clk); idle(); rst_we = 1; rst_wdata = m;
    @(negedge clk); idle();
  endtask
  task automatic wait_done(int c);
    logic [31:0] v;
    int p;
    p = 0;
    do begin repeat (50) @(negedge clk); dread(c, 8, v); p++; end while (v != 1 && p < 200);
    checks++; if (v != 1) begin failures++; $display("core %0d did not finish", c); end
  endtask
  task automatic check_core(int c);
    logic [31:0] v, e;
    for (int i = 0; i < NPIX; i++) begin
      dread(c, 512 + 4 * i, v);
      e = ref_iters(pixel_cx(c, NPIX, i), pixel_cy(c, NPIX, i));
      checks++; if (v != e) begin failures++; $display("core %0d pixel %0d: %0d expected %0d", c, i, v, e); end
    end
  endtask

  logic [31:0] prog [256];
  logic [31:0] v;
  int n;

  initial begin
    i_mask = 0; i_addr = 0; i_wdata = 0; rst_wdata = 0; irq_enable = '1; irq_clr_mask = 0;
    for (int c = 0; c < NC; c++) begin d_addr[c] = 0; d_wdata[c] = 0; end
    idle();
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++; if (rst_mask != '1) failures++;
    n = build(prog);
    for (int i = 0; i < n; i++) iwrite('1, 4 * i, prog[i]);
    for (int c = 0; c < NC; c++) begin
      iread(NC'(1) << c, 4 * 7, v);
      checks++; if (v != prog[7]) failures++;
      dwrite(c, 0, NPIX);
      dwrite(c, 8, 0);
      for (int i = 0; i < NPIX; i++) begin
        dwrite(c, 16 + 8 * i, pixel_cx(c, NPIX, i));
        dwrite(c, 20 + 8 * i, pixel_cy(c, NPIX, i));
      end
    end
    setrst('0);
    checks++; if (rst_mask != '0) failures++;
    for (int c = 0; c < NC; c++) wait_done(c);
    repeat (20) @(negedge clk);
    for (int c = 0; c < NC; c++) check_core(c);
    checks++; if (irq_pending != '1 || !irq || halted != '1) failures++;
    for (int c = 0; c < NC; c++) begin checks++; if (irq_cause[c] != EXC_ECALL) failures++; end
    @(negedge clk); idle(); irq_clr_en = 1; irq_clr_mask = 3'b101; @(negedge clk); idle();
    checks++; if (irq_pending != 3'b010 || !irq) failures++;
    @(negedge clk); idle(); irq_clr_en = 1; irq_clr_mask = 3'b010; @(negedge clk); idle();
    checks++; if (irq_pending != 0 || irq) failures++;

    // fault on core 1 only
    setrst(3'b010);
    iwrite(3'b010, 0, lw(2, 0, 6));
    dwrite(1, 8, 0);
    iread(3'b001, 0, v); checks++; if (v != prog[0]) failures++;
    iread(3'b100, 0, v); checks++; if (v != prog[0]) failures++;
    setrst('0);
    repeat (40) @(negedge clk);
    checks++;
    if (irq_pending != 3'b010 || irq_cause[1] != EXC_MEMORY || irq_info[1] != 32'd6 || !halted[1]) begin
      failures++; $display("fault pending %b cause %0d info %h", irq_pending, irq_cause[1], irq_info[1]);
    end
    // recovery
    setrst(3'b010);
    iwrite(3'b010, 0, prog[0]);
    @(negedge clk); idle(); irq_clr_en = 1; irq_clr_mask = 3'b010; @(negedge clk); idle();
    setrst('0);
    wait_done(1);
    repeat (20) @(negedge clk);
    check_core(1);
    checks++; if (irq_cause[1] != EXC_ECALL || irq_pending != 3'b010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
