// tb_vector_core: system test of one vector core through its supervisor ports only:
// the program and the pixel list are written into the instruction and data
// scratchpads while the core is held in reset, the core is released, the supervisor
// polls the done flag in data memory, and the Mandelbrot iteration counts, the square
// root and the vector result are read back and compared with the reference. The core
// must end with an ecall exception.
module tb_vector_core;
  import gecko_pkg::*;
  import mandel_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPIX = 6;
  logic clk = 0, core_rst = 1;
  always #5 clk = ~clk;

  logic        sup_i_en, sup_d_en, exc_valid, halted;
  logic [3:0]  sup_i_we, sup_d_we;
  logic [31:0] sup_i_addr, sup_i_wdata, sup_i_rdata, sup_d_addr, sup_d_wdata, sup_d_rdata, exc_info;
  exc_cause_e  exc_cause;
  int checks = 0, failures = 0, ecalls = 0;

  vector_core #(.IMEM_WORDS(256), .DMEM_WORDS(1024)) dut (.hart_id(32'd3), .*);

  always @(posedge clk) if (exc_valid) begin
    ecalls++;
    if (exc_cause != EXC_ECALL) failures++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dwrite(int addr, logic [31:0] v);
    @(negedge clk);
    sup_d_en = 1; sup_d_we = 4'hf; sup_d_addr = addr; sup_d_wdata = v;
    @(negedge clk);
    sup_d_en = 0; sup_d_we = 0;
  endtask

  task automatic dread(int addr, output logic [31:0] v);
    @(negedge clk);
    sup_d_en = 1; sup_d_we = 0; sup_d_addr = addr;
    @(negedge clk);
    sup_d_en = 0;
    v = sup_d_rdata;
  endtask

  logic [31:0] prog [256];
  logic [31:0] v;
  int n, cyc;

  initial begin
    sup_i_en = 0; sup_i_we = 0; sup_i_addr = 0; sup_i_wdata = 0;
    sup_d_en = 0; sup_d_we = 0; sup_d_addr = 0; sup_d_wdata = 0;
    n = build(prog);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      sup_i_en = 1; sup_i_we = 4'hf; sup_i_addr = i * 4; sup_i_wdata = prog[i];
    end
    @(negedge clk);
    sup_i_en = 0; sup_i_we = 0;
    // read back one instruction word
    @(negedge clk); sup_i_en = 1; sup_i_addr = 8; @(negedge clk); sup_i_en = 0;
    checks++; if (sup_i_rdata != prog[2]) failures++;
    dwrite(0, NPIX);
    dwrite(8, 0);
    for (int i = 0; i < NPIX; i++) begin
      dwrite(16 + 8 * i, pixel_cx(1, NPIX, i));
      dwrite(20 + 8 * i, pixel_cy(1, NPIX, i) );
    end
    @(negedge clk);
    core_rst = 0;
    cyc = 0;
    do begin
      repeat (20) @(negedge clk);
      cyc += 20;
      dread(8, v);
    end while (v != 1);
    repeat (20) @(negedge clk);
    $display("core finished after about %0d cycles", cyc);
    for (int i = 0; i < NPIX; i++) begin
      dread(512 + 4 * i, v);
      checks++;
      if (v != ref_iters(pixel_cx(1, NPIX, i), pixel_cy(1, NPIX, i))) begin
        failures++;
        $display("pixel %0d: %0d iterations, expected %0d", i, v, ref_iters(pixel_cx(1, NPIX, i), pixel_cy(1, NPIX, i)));
      end
    end
    dread(4, v);  checks++; if (v != 32'h4000_0000) failures++;
    dread(12, v); checks++; if (v != 32'h4160_0000) failures++;
    checks++; if (ecalls != 1 || !halted) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
