// tb_vpu: self-checking test of the 16-lane vector unit. Vector registers are filled
// element by element with vslide1down.vx, combined with vfadd/vfsub/vfmul/vfmacc, and
// read back with vmv.x.s plus slides. Each lane is compared with the double-precision
// reference of fp_ref_pkg (round to nearest even). Also checks vmv.v.x broadcast and
// the execute latencies (one cycle per beat for vfadd, two for the fused vfmacc),
// with DATAPATHS = 4, i.e. four beats per instruction.
module tb_vpu;
  import basilisk_pkg::*;
  import gecko_pkg::*;
  import vpu_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, res_valid, res_ready, op_done;
  vpu_command_t cmd;
  gecko_reg_result_t res;
  int checks = 0, failures = 0, skipped = 0;

  localparam int DP = 4;                 // multiply-adders under test: 4 beats per op
  vpu #(.DATAPATHS(DP)) dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vop(vpu_op_e op, int vd, int vs1, int vs2, logic [31:0] x, output int lat);
    @(negedge clk);
    cmd = '{op: op, vd: 5'(vd), vs1: 5'(vs1), vs2: 5'(vs2), scalar: x, rd: 5'd3};
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
    lat = 0;
    while (!op_done && !res_valid) begin @(posedge clk); #1 lat++; end
    if (res_valid) @(posedge clk);
  endtask

  task automatic load(int vd, logic [31:0] v [16]);
    int l;
    for (int i = 0; i < 16; i++) vop(VOP_SLIDE1DOWN, vd, 0, vd, v[i], l);
  endtask

  task automatic read(int vs, output logic [31:0] v [16]);
    int l;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      cmd = '{op: VOP_MV_X_S, vd: 5'd0, vs1: 5'd0, vs2: 5'(vs), scalar: 32'd0, rd: 5'd3};
      cmd_valid = 1;
      while (!cmd_ready) @(negedge clk);
      @(posedge clk);
      #1 cmd_valid = 0;
      while (!res_valid) @(posedge clk);
      v[i] = res.value;
      checks++;
      if (res.rd != 5'd3) failures++;
      @(posedge clk);
      vop(VOP_SLIDE1DOWN, vs, 0, vs, 32'd0, l);
    end
  endtask

  logic [31:0] a [16], b [16], c [16], got [16];
  int lat;

  initial begin
    cmd_valid = 0; res_ready = 1; cmd = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) begin
        a[i] = rand_float(115, 135); b[i] = rand_float(115, 135); c[i] = rand_float(115, 135);
      end
      load(1, a); load(2, b);
      vop(VOP_FADD, 4, 1, 2, 0, lat);
      if (n == 0) begin checks++; if (lat != 16 / DP) begin failures++; $display("vfadd latency %0d", lat); end end
      vop(VOP_FSUB, 5, 1, 2, 0, lat);       // vs2 - vs1 = b - a
      vop(VOP_FMUL, 6, 1, 2, 0, lat);
      load(7, c);
      vop(VOP_FMACC, 7, 1, 2, 0, lat);      // c + a*b
      if (n == 0) begin checks++; if (lat != 2 * 16 / DP) begin failures++; $display("vfmacc latency %0d", lat); end end
      read(4, got);
      for (int i = 0; i < 16; i++)
        if (sum_exact(f2r(a[i]), f2r(b[i]))) begin
          checks++; if (got[i] != r2f(f2r(a[i]) + f2r(b[i]), 0)) begin failures++; $display("vfadd lane %0d", i); end
        end else skipped++;
      read(5, got);
      for (int i = 0; i < 16; i++)
        if (sum_exact(f2r(b[i]), -f2r(a[i]))) begin
          checks++; if (got[i] != r2f(f2r(b[i]) - f2r(a[i]), 0)) begin failures++; $display("vfsub lane %0d", i); end
        end else skipped++;
      read(6, got);
      for (int i = 0; i < 16; i++) begin
        checks++; if (got[i] != r2f(f2r(a[i]) * f2r(b[i]), 0)) begin failures++; $display("vfmul lane %0d", i); end
      end
      read(7, got);
      for (int i = 0; i < 16; i++)
        if (sum_exact(f2r(a[i]) * f2r(b[i]), f2r(c[i]))) begin
          checks++;
          if (got[i] != r2f(f2r(a[i]) * f2r(b[i]) + f2r(c[i]), 0)) begin failures++; $display("vfmacc lane %0d", i); end
        end else skipped++;
    end
    vop(VOP_MV_V_X, 9, 0, 0, 32'h4049_0fdb, lat);
    read(9, got);
    for (int i = 0; i < 16; i++) begin checks++; if (got[i] != 32'h4049_0fdb) failures++; end
    checks++;
    if (skipped > 600) begin failures++; $display("skipped %0d", skipped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
