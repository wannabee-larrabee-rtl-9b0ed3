// tb_basilisk_fpu: self-checking test of the scalar FPU. Operands are loaded into the
// FP register file with fmv.w.x commands and results read back with fmv.x.w; every
// arithmetic result is compared with fp_ref_pkg (double-precision reference rounded
// independently) in all four rounding modes. Also checks special values,
// conversions, compares, and the execute latencies of add (1 cycle), fused
// multiply-add (2) and divide (30 cycles from accept to completion).
module tb_basilisk_fpu;
  import basilisk_pkg::*;
  import gecko_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, res_valid, res_ready, op_done;
  basilisk_fpu_command_t cmd;
  gecko_reg_result_t res;
  int checks = 0, failures = 0, skipped = 0;

  basilisk_fpu dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Issue one command; returns the number of cycles from acceptance to op_done
  task automatic issue(fpu_op_e op, int rd, int rs1, int rs2, int rs3, int rm, logic [31:0] iv, output int lat);
    @(negedge clk);
    cmd = '{op: op, rm: 3'(rm), rs1: 5'(rs1), rs2: 5'(rs2), rs3: 5'(rs3), rd: 5'(rd), int_val: iv};
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
    lat = 0;
    while (!op_done) begin
      @(posedge clk); #1 lat++;
    end
  endtask

  task automatic setf(int r, logic [31:0] v);
    int l;
    issue(FOP_MV_W_X, r, 0, 0, 0, 0, v, l);
  endtask

  task automatic issue_int(fpu_op_e op, int rs1, int rs2, int rm, output logic [31:0] v);
    @(negedge clk);
    cmd = '{op: op, rm: 3'(rm), rs1: 5'(rs1), rs2: 5'(rs2), rs3: 5'd0, rd: 5'd7, int_val: 32'd0};
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
    while (!res_valid) @(posedge clk);
    v = res.value;
    checks++;
    if (res.rd != 5'd7) failures++;
    @(posedge clk);
  endtask

  task automatic getf(int r, output logic [31:0] v);
    issue_int(FOP_MV_X_W, r, 0, 0, v);
  endtask

  logic [31:0] a, b, c, got, exp;
  real ra, rb, rc;
  int rm, lat;

  initial begin
    cmd_valid = 0; res_ready = 1; cmd = '0;
    repeat (3) @(posedge clk);
    rst = 0;

    for (int n = 0; n < 300; n++) begin
      rm = n % 4;
      a = rand_float(110, 140); b = rand_float(110, 140); c = rand_float(110, 140);
      ra = f2r(a); rb = f2r(b); rc = f2r(c);
      setf(1, a); setf(2, b); setf(3, c);
      // add / sub
      if (sum_exact(ra, rb)) begin
        issue(FOP_ADD, 4, 1, 2, 0, rm, 0, lat); getf(4, got); check("add", got, r2f(ra + rb, rm));
        if (n == 0) begin checks++; if (lat != 1) begin failures++; $display("add latency %0d", lat); end end
      end else skipped++;
      if (sum_exact(ra, -rb)) begin
        issue(FOP_SUB, 4, 1, 2, 0, rm, 0, lat); getf(4, got); check("sub", got, r2f(ra - rb, rm));
      end else skipped++;
      // mul (exact in double)
      issue(FOP_MUL, 5, 1, 2, 0, rm, 0, lat); getf(5, got); check("mul", got, r2f(ra * rb, rm));
      // fused multiply-add
      if (sum_exact(ra * rb, rc)) begin
        issue(FOP_MADD, 6, 1, 2, 3, rm, 0, lat); getf(6, got); check("fmadd", got, r2f(ra * rb + rc, rm));
        checks++; if (lat != 2) failures++;
        issue(FOP_NMSUB, 6, 1, 2, 3, rm, 0, lat); getf(6, got); check("fnmsub", got, r2f(-(ra * rb) + rc, rm));
      end else skipped++;
      // divide and square root
      issue(FOP_DIV, 7, 1, 2, 0, rm, 0, lat); getf(7, got); check("div", got, r2f(ra / rb, rm));
      if (n == 0) begin checks++; if (lat != 30) begin failures++; $display("div latency %0d", lat); end end
      issue(FOP_SQRT, 8, 1, 0, 0, rm, 0, lat); getf(8, got);
      check("sqrt", got, a[31] ? FP_QNAN : r2f($sqrt(ra), rm));
      // conversions and compares
      issue_int(FOP_CVT_W, 1, 0, rm, got);
      check("cvt.w.s", got, (ra > 2.0e9 || ra < -2.0e9) ? (a[31] ? 32'h8000_0000 : 32'h7fff_ffff) :
            32'(rm == 1 ? (ra < 0 ? -$floor(-ra) : $floor(ra)) : rm == 2 ? $floor(ra) :
                rm == 3 ? $ceil(ra) : ((ra - $floor(ra) == 0.5) ? (int'($floor(ra)) % 2 == 0 ? $floor(ra) : $ceil(ra))
                                                                : $floor(ra + 0.5))));
      issue_int(FOP_LT, 1, 2, 0, got); check("flt", got, {31'd0, ra < rb});
      issue_int(FOP_EQ, 1, 1, 0, got); check("feq", got, 32'd1);
    end
    // int to float, exact and rounded
    for (int n = 0; n < 100; n++) begin
      logic [31:0] iv;
      iv = $urandom;
      rm = n % 4;
      issue(FOP_CVT_S_W, 9, 0, 0, 0, rm, iv, lat); getf(9, got); check("cvt.s.w", got, r2f(real'($signed(iv)), rm));
      issue(FOP_CVT_S_WU, 9, 0, 0, 0, rm, iv, lat); getf(9, got); check("cvt.s.wu", got, r2f(real'(iv), rm));
    end
    // Special values
    setf(1, 32'h7f80_0000); setf(2, 32'hff80_0000); setf(3, 32'h0000_0000);
    issue(FOP_ADD, 4, 1, 2, 0, 0, 0, lat); getf(4, got); check("inf-inf", got, FP_QNAN);
    issue(FOP_MUL, 4, 1, 3, 0, 0, 0, lat); getf(4, got); check("inf*0", got, FP_QNAN);
    setf(5, 32'h3f80_0000);
    issue(FOP_DIV, 4, 5, 3, 0, 0, 0, lat); getf(4, got); check("1/0", got, 32'h7f80_0000);
    setf(6, 32'h7f00_0000);
    issue(FOP_MUL, 4, 6, 6, 0, 0, 0, lat); getf(4, got); check("overflow rne", got, 32'h7f80_0000);
    issue(FOP_MUL, 4, 6, 6, 0, 1, 0, lat); getf(4, got); check("overflow rtz", got, 32'h7f7f_ffff);
    setf(7, 32'h4080_0000);  // 4.0
    issue(FOP_SQRT, 4, 7, 0, 0, 0, 0, lat); getf(4, got); check("sqrt4", got, 32'h4000_0000);
    issue(FOP_SGNJN, 4, 7, 7, 0, 0, 0, lat); getf(4, got); check("fsgnjn", got, 32'hc080_0000);
    issue(FOP_MIN, 4, 7, 5, 0, 0, 0, lat); getf(4, got); check("fmin", got, 32'h3f80_0000);
    issue(FOP_MAX, 4, 7, 5, 0, 0, 0, lat); getf(4, got); check("fmax", got, 32'h4080_0000);
    checks++;
    if (skipped > 200) begin failures++; $display("too many inexact cases skipped: %0d", skipped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
