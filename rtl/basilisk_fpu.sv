// basilisk_fpu: scalar single-precision floating-point unit of a vector core, with
// its own 32-entry FP register file (RV32F f0..f31).
// It follows the FPU block diagram: an encoder turns integer operands into floats,
// the register file feeds the parsing stage, which fans out to the multiplier, the
// adder (the multiplier also feeds the adder for fused multiply-add) and the
// iterative divider/square root; writeback selection picks the active result and a
// shared rounding stage rounds it into the register file. Results for the integer
// pipeline (float-to-int conversion, moves, compares) leave through the decoder port
// as a gecko_reg_result_t.
// This implementation executes one command at a time, so FP register hazards cannot
// arise: add, subtract, multiply, sign injection, min/max, conversions and compares
// take 1 execute cycle, fused multiply-add 2 and divide/square root 27 (plus one
// cycle for the rounding of the quotient or root). A command is accepted when
// cmd_valid and cmd_ready are both high; FP results are written in the cycle after
// the execute phase ends, integer results are offered on res_valid/res_ready.
// Choices of this implementation: dynamic rounding (rm = 7) uses round to nearest
// even; subnormals are flushed to zero (see basilisk_pkg).
module basilisk_fpu
  import basilisk_pkg::*;
  import gecko_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  basilisk_fpu_command_t cmd,
  output logic                  res_valid,
  input  logic                  res_ready,
  output gecko_reg_result_t     res,
  output logic                  op_done      // one pulse per completed operation
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_ROUND, S_INT} state_e;

  state_e                state;
  basilisk_fpu_command_t cmd_q;
  logic [31:0]           fregs [32];
  logic [31:0]           a_q, b_q, c_q;
  logic [1:0]            cycles_q;
  logic [31:0]           result_q;
  logic [2:0]            rm_eff;

  // Divider / square root
  logic        ds_start, ds_busy, ds_done, ds_sticky;
  logic [26:0] ds_result;
  logic [23:0] ds_ma, ds_mb;
  logic [53:0] ds_rad;
  logic        sq_odd;
  int          sq_exp;

  assign rm_eff = (cmd_q.rm > 3'd4) ? 3'(RM_RNE) : cmd_q.rm;

  // Operation classes
  function automatic logic is_int_result(fpu_op_e op);
    return op inside {FOP_CVT_W, FOP_CVT_WU, FOP_MV_X_W, FOP_EQ, FOP_LT, FOP_LE};
  endfunction

  function automatic logic is_fma(fpu_op_e op);
    return op inside {FOP_MADD, FOP_MSUB, FOP_NMSUB, FOP_NMADD};
  endfunction

  // Square-root radicand: even exponent, significand scaled by 2^28
  assign sq_odd = a_q[23];  // odd biased exponent <=> odd LSB weight (e - 150)
  assign sq_exp = fp_lsb_exp(a_q) - (sq_odd ? 1 : 0);
  assign ds_ma  = fp_mant(a_q);
  assign ds_mb  = fp_mant(b_q);
  assign ds_rad = sq_odd ? {1'b0, fp_mant(a_q), 29'd0} : {2'b00, fp_mant(a_q), 28'd0};

  // Execute: one result per operation class, then writeback selection
  // One adder, one multiplier and one fused multiply-adder; the four fused variants
  // differ only in the product and addend negations.
  logic [31:0] exec_result, add_result, mul_result, fma_result;
  assign add_result = fp_add(a_q, b_q, cmd_q.op == FOP_SUB, rm_eff);
  assign mul_result = fp_mul(a_q, b_q, rm_eff);
  assign fma_result = fp_fma(a_q, b_q, c_q, cmd_q.op inside {FOP_NMSUB, FOP_NMADD},
                             cmd_q.op inside {FOP_MSUB, FOP_NMADD}, rm_eff);
  always_comb begin
    unique case (cmd_q.op)
      FOP_ADD, FOP_SUB: exec_result = add_result;
      FOP_MUL:      exec_result = mul_result;
      FOP_MADD, FOP_MSUB, FOP_NMSUB, FOP_NMADD: exec_result = fma_result;
      FOP_SGNJ:     exec_result = {b_q[31], a_q[30:0]};
      FOP_SGNJN:    exec_result = {~b_q[31], a_q[30:0]};
      FOP_SGNJX:    exec_result = {a_q[31] ^ b_q[31], a_q[30:0]};
      FOP_MIN, FOP_MAX: begin
        if (fp_is_nan(a_q) && fp_is_nan(b_q)) exec_result = FP_QNAN;
        else if (fp_is_nan(a_q))              exec_result = b_q;
        else if (fp_is_nan(b_q))              exec_result = a_q;
        else if (fp_less(a_q, b_q, 1'b0) || (fp_equal(a_q, b_q) && a_q[31]))
          exec_result = (cmd_q.op == FOP_MIN) ? a_q : b_q;
        else
          exec_result = (cmd_q.op == FOP_MIN) ? b_q : a_q;
      end
      FOP_CVT_W:    exec_result = fp_to_int(a_q, 1'b1, rm_eff);
      FOP_CVT_WU:   exec_result = fp_to_int(a_q, 1'b0, rm_eff);
      FOP_CVT_S_W:  exec_result = fp_from_int(cmd_q.int_val, 1'b1, rm_eff);
      FOP_CVT_S_WU: exec_result = fp_from_int(cmd_q.int_val, 1'b0, rm_eff);
      FOP_MV_X_W:   exec_result = a_q;
      FOP_MV_W_X:   exec_result = cmd_q.int_val;
      FOP_EQ:       exec_result = {31'd0, fp_equal(a_q, b_q)};
      FOP_LT:       exec_result = {31'd0, fp_less(a_q, b_q, 1'b0)};
      FOP_LE:       exec_result = {31'd0, fp_less(a_q, b_q, 1'b1)};
      default:      exec_result = '0;
    endcase
  end

  // Rounding of the divider/sqrt output, with the special cases
  logic [31:0] divsqrt_result;
  always_comb begin
    if (cmd_q.op == FOP_SQRT) begin
      if (fp_is_nan(a_q) || (a_q[31] && !fp_is_zero(a_q))) divsqrt_result = FP_QNAN;
      else if (fp_is_zero(a_q) || fp_is_inf(a_q))         divsqrt_result = a_q[31] ? {1'b1, 31'd0} : a_q;
      else divsqrt_result = fp_pack(1'b0, {36'd0, ds_result, ds_sticky}, ((sq_exp - 28) >>> 1) - 1, rm_eff);
    end else begin
      if (fp_is_nan(a_q) || fp_is_nan(b_q) || (fp_is_inf(a_q) && fp_is_inf(b_q)) ||
          (fp_is_zero(a_q) && fp_is_zero(b_q)))           divsqrt_result = FP_QNAN;
      else if (fp_is_inf(a_q) || fp_is_zero(b_q))          divsqrt_result = {a_q[31] ^ b_q[31], 8'hff, 23'd0};
      else if (fp_is_zero(a_q) || fp_is_inf(b_q))          divsqrt_result = {a_q[31] ^ b_q[31], 31'd0};
      else divsqrt_result = fp_pack(a_q[31] ^ b_q[31], {36'd0, ds_result, ds_sticky},
                                    fp_lsb_exp(a_q) - fp_lsb_exp(b_q) - 27, rm_eff);
    end
  end

  assign cmd_ready = (state == S_IDLE);
  assign ds_start  = (state == S_EXEC) && (cmd_q.op inside {FOP_DIV, FOP_SQRT}) && !ds_busy && (cycles_q == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cycles_q <= '0;
      result_q <= '0;
      op_done  <= 1'b0;
      cmd_q    <= '0;
      a_q      <= '0;
      b_q      <= '0;
      c_q      <= '0;
    end else begin
      op_done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q    <= cmd;
          a_q      <= fregs[cmd.rs1];
          b_q      <= fregs[cmd.rs2];
          c_q      <= fregs[cmd.rs3];
          cycles_q <= '0;
          state    <= S_EXEC;
        end
        S_EXEC: begin
          if (cmd_q.op inside {FOP_DIV, FOP_SQRT}) begin
            cycles_q <= 2'd1;                 // divider started
            if (ds_done) state <= S_ROUND;
          end else if (is_fma(cmd_q.op) && cycles_q == 2'd0) begin
            cycles_q <= 2'd1;                 // second cycle of a fused multiply-add
          end else begin
            result_q <= exec_result;
            state    <= is_int_result(cmd_q.op) ? S_INT : S_IDLE;
            op_done  <= !is_int_result(cmd_q.op);
          end
        end
        S_ROUND: begin
          state   <= S_IDLE;
          op_done <= 1'b1;
        end
        S_INT: if (res_ready) begin
          state   <= S_IDLE;
          op_done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // FP register file: one write port (the rounding stage)
  logic        fwe;
  logic [31:0] fwdata;
  always_comb begin
    fwe    = 1'b0;
    fwdata = exec_result;
    if (state == S_EXEC && !(cmd_q.op inside {FOP_DIV, FOP_SQRT}) &&
        !(is_fma(cmd_q.op) && cycles_q == 2'd0) && !is_int_result(cmd_q.op))
      fwe = 1'b1;
    if (state == S_ROUND) begin
      fwe    = 1'b1;
      fwdata = divsqrt_result;
    end
  end

  always_ff @(posedge clk) begin
    if (fwe) fregs[cmd_q.rd] <= fwdata;
  end

  basilisk_divsqrt u_divsqrt (
    .clk, .rst,
    .start  (ds_start),
    .is_sqrt(cmd_q.op == FOP_SQRT),
    .ma     (ds_ma),
    .mb     (ds_mb),
    .rad    (ds_rad),
    .busy   (ds_busy),
    .done   (ds_done),
    .result (ds_result),
    .sticky (ds_sticky)
  );

  assign res_valid = (state == S_INT);
  assign res.rd    = cmd_q.rd;
  assign res.value = result_q;
  assign res.write = 1'b1;
endmodule
