// vpu_pkg: command format of the 16-lane vector unit. The vector instructions are
// the unmasked single-precision subset of the RISC-V vector extension that this
// design executes with a fixed vector length of 16 elements of 32 bits (one 512-bit
// register). The enum and the struct layout are this implementation's own.
package vpu_pkg;

  localparam int unsigned LANES = 16;

  typedef enum logic [2:0] {
    VOP_FADD,        // vfadd.vv      vd = vs2 + vs1
    VOP_FSUB,        // vfsub.vv      vd = vs2 - vs1
    VOP_FMUL,        // vfmul.vv      vd = vs2 * vs1
    VOP_FMACC,       // vfmacc.vv     vd = vs1 * vs2 + vd (fused)
    VOP_MV_V_X,      // vmv.v.x       vd[i] = x[rs1]
    VOP_SLIDE1DOWN,  // vslide1down.vx vd[i] = vs2[i+1], vd[15] = x[rs1]
    VOP_MV_X_S       // vmv.x.s       x[rd] = vs2[0]
  } vpu_op_e;

  typedef struct packed {
    vpu_op_e     op;
    logic [4:0]  vd;
    logic [4:0]  vs1;
    logic [4:0]  vs2;
    logic [31:0] scalar;   // x[rs1]
    logic [4:0]  rd;       // integer destination of vmv.x.s
  } vpu_command_t;

endpackage
