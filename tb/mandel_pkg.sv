// mandel_pkg: the Mandelbrot workload used by the system-level testbenches, plus its
// reference model. Every core receives the same program; the supervisor gives each
// core its own list of pixels in its data memory.
// Data memory layout of a core (byte addresses):
//   0      number of pixels
//   4      result of a square root (sqrt(4.0), as float bits)
//   8      done flag, written last by the program
//   12     result of a short vector sequence (element 0)
//   16+8i  pixel i: cx, cy (float bits)
//   512+4i iteration count of pixel i (0..MAXIT)
// The program iterates z = z*z + c in single precision with separate multiplies and
// adds, stops when |z|^2 > 4 or after MAXIT iterations, then runs a divide, a square
// root and a few vector instructions, sets the done flag and executes ecall. The
// reference repeats the same operations with the same rounding.
package mandel_pkg;
  import rv_asm_pkg::*;
  import fp_ref_pkg::*;

  localparam int MAXIT = 24;

  // Fill prog with the program; returns its length in words
  function automatic int build(ref logic [31:0] prog [256]);
    int pc;
    pc = 0;
    prog[pc++] = lw(2, 0, 0);            // pixel count
    prog[pc++] = addi(3, 0, 16);         // input pointer
    prog[pc++] = addi(4, 0, 512);        // output pointer
    prog[pc++] = lui(5, 20'h40800);      // 4.0
    prog[pc++] = fmv_w_x(10, 5);
    prog[pc++] = addi(6, 0, MAXIT);
    // pix: (pc 6)
    prog[pc++] = lw(7, 3, 0);
    prog[pc++] = fmv_w_x(1, 7);          // cx
    prog[pc++] = lw(8, 3, 4);
    prog[pc++] = fmv_w_x(2, 8);          // cy
    prog[pc++] = fmv_w_x(3, 0);          // zx = 0
    prog[pc++] = fmv_w_x(4, 0);          // zy = 0
    prog[pc++] = addi(9, 0, 0);          // iteration count
    // iter: (pc 13)
    prog[pc++] = fmul(5, 3, 3);          // zx^2
    prog[pc++] = fmul(6, 4, 4);          // zy^2
    prog[pc++] = fadd(7, 5, 6);
    prog[pc++] = flt(10, 10, 7);         // 4 < |z|^2
    prog[pc++] = bne(10, 0, 11 * 4);     // -> done_pix (pc 28)
    prog[pc++] = fmul(8, 3, 4);
    prog[pc++] = fadd(8, 8, 8);
    prog[pc++] = fadd(4, 8, 2);          // zy = 2 zx zy + cy
    prog[pc++] = fsub(9, 5, 6);
    prog[pc++] = fadd(3, 9, 1);          // zx = zx^2 - zy^2 + cx
    prog[pc++] = addi(9, 9, 1);
    prog[pc++] = bne(9, 6, -11 * 4);     // -> iter
    prog[pc++] = jal(0, 3 * 4);          // -> done_pix (pc 28)
    prog[pc++] = addi(9, 0, 77);         // never executed
    prog[pc++] = addi(9, 0, 78);         // never executed
    // done_pix: (pc 28)
    prog[pc++] = sw(9, 4, 0);
    prog[pc++] = addi(3, 3, 8);
    prog[pc++] = addi(4, 4, 4);
    prog[pc++] = addi(2, 2, -1);
    prog[pc++] = bne(2, 0, -26 * 4);     // -> pix (pc 6)
    prog[pc++] = fdiv(11, 10, 10);       // 1.0
    prog[pc++] = fmul(12, 11, 10);       // 4.0
    prog[pc++] = fsqrt(12, 12);          // 2.0
    prog[pc++] = fmv_x_w(14, 12);
    prog[pc++] = sw(14, 0, 4);
    prog[pc++] = lui(12, 20'h40000);     // 2.0
    prog[pc++] = vmv_v_x(1, 12);
    prog[pc++] = vfmul_vv(2, 1, 1);      // 4.0
    prog[pc++] = vfadd_vv(3, 2, 1);      // 6.0
    prog[pc++] = vfmacc_vv(3, 1, 2);     // 6 + 8 = 14.0
    prog[pc++] = vmv_x_s(13, 3);
    prog[pc++] = sw(13, 0, 12);
    prog[pc++] = addi(11, 0, 1);
    prog[pc++] = sw(11, 0, 8);           // done
    prog[pc++] = ecall();
    return pc;
  endfunction

  // Pixel i of core k: c = (-2 + 0.1875 * ((k*npix + i) % 16), -1.125 + 0.140625 * ((k*npix + i) / 16 % 16))
  function automatic logic [31:0] pixel_cx(int k, int npix, int i);
    return r2f(-2.0 + 0.1875 * real'((k * npix + i) % 16), 0);
  endfunction
  function automatic logic [31:0] pixel_cy(int k, int npix, int i);
    return r2f(-1.125 + 0.140625 * real'(((k * npix + i) / 16) % 16), 0);
  endfunction

  // Reference iteration count with the program's operation order and rounding
  function automatic int ref_iters(logic [31:0] cx, logic [31:0] cy);
    logic [31:0] zx, zy, zx2, zy2, mag, t;
    int it;
    zx = 0; zy = 0; it = 0;
    while (1) begin
      zx2 = r2f(f2r(zx) * f2r(zx), 0);
      zy2 = r2f(f2r(zy) * f2r(zy), 0);
      mag = r2f(f2r(zx2) + f2r(zy2), 0);
      if (4.0 < f2r(mag)) break;
      t  = r2f(f2r(zx) * f2r(zy), 0);
      t  = r2f(f2r(t) + f2r(t), 0);
      zy = r2f(f2r(t) + f2r(cy), 0);
      t  = r2f(f2r(zx2) - f2r(zy2), 0);
      zx = r2f(f2r(t) + f2r(cx), 0);
      it++;
      if (it == MAXIT) break;
    end
    return it;
  endfunction

endpackage
