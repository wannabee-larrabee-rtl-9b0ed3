// rv_asm_pkg: instruction encoders used by the testbenches to write small RV32I/F/V
// programs for the vector cores. Each function returns one 32-bit instruction word
// in the standard RISC-V encoding.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] opc);
    logic [11:0] i;
    i = 12'(imm);
    return {i, rs1, f3, rd, opc};
  endfunction

  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] slli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] srai(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] xori(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b100, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] add(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] slt(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b010, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sltu(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b011, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] and_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b111, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] or_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b110, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] xor_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b100, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sll(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b001, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] srl(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'd0, rs2, rs1, 3'b101, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sra(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b101, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] lui(logic [4:0] rd, logic [19:0] imm);
    return {imm, rd, 7'b0110111};
  endfunction
  function automatic logic [31:0] auipc(logic [4:0] rd, logic [19:0] imm);
    return {imm, rd, 7'b0010111};
  endfunction
  function automatic logic [31:0] lw(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] lb(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] lhu(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b101, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] store(logic [2:0] f3, logic [4:0] rs2, logic [4:0] rs1, int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], rs2, rs1, f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] sw(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return store(3'b010, rs2, rs1, imm);
  endfunction
  function automatic logic [31:0] sb(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return store(3'b000, rs2, rs1, imm);
  endfunction
  function automatic logic [31:0] branch(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2, int off);
    logic [12:0] o;
    o = 13'(off);
    return {o[12], o[10:5], rs2, rs1, f3, o[4:1], o[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] beq(logic [4:0] rs1, logic [4:0] rs2, int off);
    return branch(3'b000, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] bne(logic [4:0] rs1, logic [4:0] rs2, int off);
    return branch(3'b001, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] blt(logic [4:0] rs1, logic [4:0] rs2, int off);
    return branch(3'b100, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] jal(logic [4:0] rd, int off);
    logic [20:0] o;
    o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] csrrs(logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);
    return {csr, rs1, 3'b010, rd, 7'b1110011};
  endfunction
  function automatic logic [31:0] csrrw(logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);
    return {csr, rs1, 3'b001, rd, 7'b1110011};
  endfunction
  function automatic logic [31:0] ecall();
    return 32'h0000_0073;
  endfunction
  // Single-precision FP (rm = 000, round to nearest even)
  function automatic logic [31:0] fp_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                       logic [2:0] f3, logic [4:0] rd);
    return r_type(f7, rs2, rs1, f3, rd, 7'b1010011);
  endfunction
  function automatic logic [31:0] fadd(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return fp_r(7'b0000000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fsub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return fp_r(7'b0000100, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fmul(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return fp_r(7'b0001000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fdiv(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return fp_r(7'b0001100, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fsqrt(logic [4:0] rd, logic [4:0] rs1);
    return fp_r(7'b0101100, 5'd0, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] flt(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return fp_r(7'b1010000, rs2, rs1, 3'b001, rd);
  endfunction
  function automatic logic [31:0] fcvt_s_w(logic [4:0] rd, logic [4:0] rs1);
    return fp_r(7'b1101000, 5'd0, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fcvt_w_s(logic [4:0] rd, logic [4:0] rs1);
    return fp_r(7'b1100000, 5'd0, rs1, 3'b001, rd);   // round toward zero
  endfunction
  function automatic logic [31:0] fmv_x_w(logic [4:0] rd, logic [4:0] rs1);
    return fp_r(7'b1110000, 5'd0, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fmv_w_x(logic [4:0] rd, logic [4:0] rs1);
    return fp_r(7'b1111000, 5'd0, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] fmadd(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2, logic [4:0] rs3);
    return {rs3, 2'b00, rs2, rs1, 3'b000, rd, 7'b1000011};
  endfunction
  // Vector (OP-V), unmasked
  function automatic logic [31:0] opv(logic [5:0] f6, logic [4:0] vs2, logic [4:0] vs1,
                                      logic [2:0] f3, logic [4:0] vd);
    return {f6, 1'b1, vs2, vs1, f3, vd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vfadd_vv(logic [4:0] vd, logic [4:0] vs2, logic [4:0] vs1);
    return opv(6'b000000, vs2, vs1, 3'b001, vd);
  endfunction
  function automatic logic [31:0] vfsub_vv(logic [4:0] vd, logic [4:0] vs2, logic [4:0] vs1);
    return opv(6'b000010, vs2, vs1, 3'b001, vd);
  endfunction
  function automatic logic [31:0] vfmul_vv(logic [4:0] vd, logic [4:0] vs2, logic [4:0] vs1);
    return opv(6'b100100, vs2, vs1, 3'b001, vd);
  endfunction
  function automatic logic [31:0] vfmacc_vv(logic [4:0] vd, logic [4:0] vs1, logic [4:0] vs2);
    return opv(6'b101100, vs2, vs1, 3'b001, vd);
  endfunction
  function automatic logic [31:0] vmv_v_x(logic [4:0] vd, logic [4:0] rs1);
    return opv(6'b010111, 5'd0, rs1, 3'b100, vd);
  endfunction
  function automatic logic [31:0] vslide1down(logic [4:0] vd, logic [4:0] vs2, logic [4:0] rs1);
    return opv(6'b001111, vs2, rs1, 3'b110, vd);
  endfunction
  function automatic logic [31:0] vmv_x_s(logic [4:0] rd, logic [4:0] vs2);
    return opv(6'b010000, vs2, 5'd0, 3'b010, rd);
  endfunction
  function automatic logic [31:0] vsetvli(logic [4:0] rd, logic [4:0] rs1);
    return {1'b0, 11'b000_0001_0000, rs1, 3'b111, rd, 7'b1010111};
  endfunction

endpackage
