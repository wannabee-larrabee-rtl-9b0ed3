// basilisk_pkg: shared types and arithmetic for the scalar FPU (basilisk) and the
// 16-lane vector unit. IEEE-754 single precision with the four rounding modes the
// design supports: round to nearest even, toward zero, down and up (RISC-V rm codes
// 0..3). Every operation computes an exact or sticky-jammed intermediate and goes
// through one shared normalise-and-round function, which mirrors the shared rounding
// stage of the FPU. Design choices of this implementation (not from the source
// design): subnormal inputs are read as zero and subnormal results are flushed to a
// signed zero; every NaN result is the canonical quiet NaN 0x7fc00000; the mantissa
// product is formed as two partial products, the upper 6 bits and the lower 18 bits
// of the first operand times the second operand, the split the design uses to fit
// two 27x18 DSP multipliers.
package basilisk_pkg;

  typedef enum logic [2:0] {
    RM_RNE = 3'd0,
    RM_RTZ = 3'd1,
    RM_RDN = 3'd2,
    RM_RUP = 3'd3
  } rm_e;

  localparam logic [31:0] FP_QNAN = 32'h7fc0_0000;

  // Operations of the scalar FPU
  typedef enum logic [4:0] {
    FOP_ADD, FOP_SUB, FOP_MUL, FOP_DIV, FOP_SQRT,
    FOP_MADD, FOP_MSUB, FOP_NMSUB, FOP_NMADD,
    FOP_SGNJ, FOP_SGNJN, FOP_SGNJX, FOP_MIN, FOP_MAX,
    FOP_CVT_W, FOP_CVT_WU, FOP_CVT_S_W, FOP_CVT_S_WU,
    FOP_MV_X_W, FOP_MV_W_X, FOP_EQ, FOP_LT, FOP_LE
  } fpu_op_e;

  // Command from the decoder to the FPU (basilisk_fpu_command_t in the block diagram)
  typedef struct packed {
    fpu_op_e     op;
    logic [2:0]  rm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rs3;
    logic [4:0]  rd;
    logic [31:0] int_val;   // integer source operand (fcvt.s.w, fmv.w.x)
  } basilisk_fpu_command_t;

  // Result written back into the FP register file by the rounding stage
  typedef struct packed {
    logic [4:0]  rd;
    logic [31:0] value;
  } basilisk_reg_result_t;

  function automatic logic fp_is_nan(logic [31:0] x);
    return (x[30:23] == 8'hff) && (x[22:0] != 0);
  endfunction

  function automatic logic fp_is_inf(logic [31:0] x);
    return (x[30:23] == 8'hff) && (x[22:0] == 0);
  endfunction

  // Subnormals count as zero
  function automatic logic fp_is_zero(logic [31:0] x);
    return x[30:23] == 8'h00;
  endfunction

  // Significand with the hidden one
  function automatic logic [23:0] fp_mant(logic [31:0] x);
    return {1'b1, x[22:0]};
  endfunction

  // Weight of the significand's LSB: value = mant * 2^fp_lsb_exp
  function automatic int fp_lsb_exp(logic [31:0] x);
    return int'(x[30:23]) - 150;
  endfunction

  // Normalise and round (-1)^s * m * 2^e2 to single precision
  function automatic logic [31:0] fp_pack(logic s, logic [63:0] m, int e2, logic [2:0] rm);
    int p;
    int be;
    logic [63:0] n;
    logic g, st, inc;
    logic [24:0] r;
    if (m == 64'd0) return {s, 31'd0};
    p = 0;
    for (int i = 0; i < 64; i++) if (m[i]) p = i;
    n  = m << (63 - p);
    be = p + e2 + 127;
    g  = n[39];
    st = |n[38:0];
    case (rm)
      RM_RNE:  inc = g & (st | n[40]);
      RM_RTZ:  inc = 1'b0;
      RM_RDN:  inc = s & (g | st);
      RM_RUP:  inc = !s & (g | st);
      default: inc = g;                      // round to nearest, ties away
    endcase
    r = {2'b01, n[62:40]} + {24'd0, inc};
    if (r[24]) be = be + 1;
    if (be >= 255) begin
      if (rm == RM_RTZ || (rm == RM_RDN && !s) || (rm == RM_RUP && s))
        return {s, 8'hfe, 23'h7f_ffff};
      return {s, 8'hff, 23'd0};
    end
    if (be <= 0) return {s, 31'd0};
    return {s, be[7:0], r[22:0]};
  endfunction

  // Sign of an exact zero sum of two operands with signs sa and sb
  function automatic logic fp_zero_sum_sign(logic sa, logic sb, logic [2:0] rm);
    return (sa == sb) ? sa : (rm == RM_RDN);
  endfunction

  // Add two nonzero values (-1)^sa*ma*2^ea and (-1)^sb*mb*2^eb whose leading ones
  // sit at bit 58 or above and below bit 61. The smaller one is shifted right with
  // the shifted-out bits jammed into bit 0, far below the rounding position.
  function automatic logic [31:0] fp_add_core(logic sa, logic [63:0] ma, int ea,
                                              logic sb, logic [63:0] mb, int eb,
                                              logic [2:0] rm);
    logic [63:0] big, lesser, sm, m;
    logic sbig, slesser, s;
    int ebig, d;
    if (ea >= eb) begin
      big = ma; sbig = sa; ebig = ea; lesser = mb; slesser = sb; d = ea - eb;
    end else begin
      big = mb; sbig = sb; ebig = eb; lesser = ma; slesser = sa; d = eb - ea;
    end
    if (d > 62) sm = {63'd0, |lesser};
    else        sm = (lesser >> d) | {63'd0, |(lesser & ((64'd1 << d) - 64'd1))};
    if (sbig == slesser) begin
      m = big + sm; s = sbig;
    end else if (big >= sm) begin
      m = big - sm; s = sbig;
    end else begin
      m = sm - big; s = slesser;
    end
    if (m == 64'd0) return {rm == RM_RDN, 31'd0};
    return fp_pack(s, m, ebig, rm);
  endfunction

  function automatic logic [31:0] fp_add(logic [31:0] a, logic [31:0] b, logic sub, logic [2:0] rm);
    logic sb;
    sb = b[31] ^ sub;
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b)) return (a[31] == sb) ? a : FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return {sb, b[30:0]};
    if (fp_is_zero(a) && fp_is_zero(b)) return {fp_zero_sum_sign(a[31], sb, rm), 31'd0};
    if (fp_is_zero(a)) return {sb, b[30:0]};
    if (fp_is_zero(b)) return a;
    return fp_add_core(a[31], {4'd0, fp_mant(a), 36'd0}, fp_lsb_exp(a) - 36,
                       sb,    {4'd0, fp_mant(b), 36'd0}, fp_lsb_exp(b) - 36, rm);
  endfunction

  // 24x24 significand product as two DSP-sized partial products
  function automatic logic [47:0] fp_mant_mul(logic [23:0] ma, logic [23:0] mb);
    logic [29:0] hi;
    logic [41:0] lo;
    hi = ma[23:18] * mb;
    lo = ma[17:0] * mb;
    return ({18'd0, hi} << 18) + {6'd0, lo};
  endfunction

  function automatic logic [31:0] fp_mul(logic [31:0] a, logic [31:0] b, logic [2:0] rm);
    logic s;
    s = a[31] ^ b[31];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) return {s, 8'hff, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    return fp_pack(s, {16'd0, fp_mant_mul(fp_mant(a), fp_mant(b))},
                   fp_lsb_exp(a) + fp_lsb_exp(b), rm);
  endfunction

  // Fused (-1)^np * a*b + (-1)^nc * c with a single rounding
  function automatic logic [31:0] fp_fma(logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                         logic np, logic nc, logic [2:0] rm);
    logic sp, sc;
    logic [47:0] p;
    sp = a[31] ^ b[31] ^ np;
    sc = c[31] ^ nc;
    if (fp_is_nan(a) || fp_is_nan(b) || fp_is_nan(c)) return FP_QNAN;
    if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) begin
      if (fp_is_inf(c) && sc != sp) return FP_QNAN;
      return {sp, 8'hff, 23'd0};
    end
    if (fp_is_inf(c)) return {sc, 8'hff, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) begin
      if (fp_is_zero(c)) return {fp_zero_sum_sign(sp, sc, rm), 31'd0};
      return {sc, c[30:0]};
    end
    p = fp_mant_mul(fp_mant(a), fp_mant(b));
    if (fp_is_zero(c)) return fp_pack(sp, {16'd0, p}, fp_lsb_exp(a) + fp_lsb_exp(b), rm);
    return fp_add_core(sp, {4'd0, p, 12'd0}, fp_lsb_exp(a) + fp_lsb_exp(b) - 12,
                       sc, {4'd0, fp_mant(c), 36'd0}, fp_lsb_exp(c) - 36, rm);
  endfunction

  // Signed or unsigned 32-bit integer to float
  function automatic logic [31:0] fp_from_int(logic [31:0] x, logic is_signed, logic [2:0] rm);
    logic s;
    logic [31:0] mag;
    s   = is_signed & x[31];
    mag = s ? (~x + 32'd1) : x;
    return fp_pack(s, {32'd0, mag}, 0, rm);
  endfunction

  // Float to signed or unsigned 32-bit integer, saturating as RISC-V specifies
  function automatic logic [31:0] fp_to_int(logic [31:0] a, logic is_signed, logic [2:0] rm);
    int e;
    logic [95:0] sh;
    logic [63:0] ip;
    logic g, st, inc;
    logic [32:0] mag;
    if (fp_is_nan(a)) return is_signed ? 32'h7fff_ffff : 32'hffff_ffff;
    if (fp_is_zero(a)) return 32'd0;
    e = fp_lsb_exp(a);
    if (e > 8) begin
      mag = 33'h1_ffff_ffff;               // out of range
    end else begin
      // 32 fraction bits below the binary point
      sh = {40'd0, fp_mant(a), 32'd0};
      if (e >= 0) sh = sh << e;
      else        sh = (-e >= 64) ? {95'd0, 1'b1} : ((sh >> (-e)) | {95'd0, |(sh & ((96'd1 << (-e)) - 96'd1))});
      ip  = sh[95:32];
      g   = sh[31];
      st  = |sh[30:0];
      case (rm)
        RM_RNE:  inc = g & (st | ip[0]);
        RM_RTZ:  inc = 1'b0;
        RM_RDN:  inc = a[31] & (g | st);
        RM_RUP:  inc = !a[31] & (g | st);
        default: inc = g;
      endcase
      ip  = ip + {63'd0, inc};
      mag = (ip[63:33] != 0) ? 33'h1_ffff_ffff : ip[32:0];
    end
    if (is_signed) begin
      if (!a[31]) return (mag > 33'h0_7fff_ffff) ? 32'h7fff_ffff : mag[31:0];
      return (mag > 33'h0_8000_0000) ? 32'h8000_0000 : (~mag[31:0] + 32'd1);
    end
    if (a[31]) return (mag == 33'd0) ? 32'd0 : 32'd0;
    return (mag > 33'h0_ffff_ffff) ? 32'hffff_ffff : mag[31:0];
  endfunction

  // a < b (lt) or a <= b (le); false when either is NaN. Subnormals compare as zero.
  function automatic logic fp_less(logic [31:0] a, logic [31:0] b, logic or_equal);
    logic [31:0] ca, cb;
    logic eq, lt;
    if (fp_is_nan(a) || fp_is_nan(b)) return 1'b0;
    ca = fp_is_zero(a) ? 32'd0 : a;
    cb = fp_is_zero(b) ? 32'd0 : b;
    eq = (ca == cb);
    if (ca[31] != cb[31]) lt = ca[31];
    else if (ca[31])      lt = ca[30:0] > cb[30:0];
    else                  lt = ca[30:0] < cb[30:0];
    return or_equal ? (lt | eq) : (lt & !eq);
  endfunction

  function automatic logic fp_equal(logic [31:0] a, logic [31:0] b);
    if (fp_is_nan(a) || fp_is_nan(b)) return 1'b0;
    if (fp_is_zero(a) && fp_is_zero(b)) return 1'b1;
    return a == b;
  endfunction

endpackage
