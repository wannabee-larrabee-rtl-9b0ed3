// vpu: vector processing unit of a vector core: 16 single-precision lanes working
// on a 32-entry register file of 512-bit vector registers (16 kbit in total, one
// write port). All arithmetic goes through fused multiply-adders: vfmul is
// a*b + (-0), vfadd/vfsub are a*1.0 +/- b, and vfmacc is the fused a*b + vd with one
// rounding, so rounding logic is shared between the operations as the source design
// intends. Results round to nearest even (no rounding-mode input here).
// DATAPATHS sets how many multiply-adders the unit has (1, 2, 4, 8 or 16). The 16
// elements of a vector are processed DATAPATHS at a time in LANES/DATAPATHS beats.
// The default, 16, gives one multiply-adder per lane and a single beat: the
// full-throughput arrangement the source describes. Smaller values are this
// implementation's addition, for builds that trade vector throughput for area; the
// instruction-level behaviour is the same for every setting.
// Supported instructions (unmasked, vector length fixed at 16): vfadd.vv, vfsub.vv,
// vfmul.vv, vfmacc.vv, vmv.v.x, vslide1down.vx and vmv.x.s. The last one returns
// element 0 to the integer pipeline through res_valid/res_ready; vmv.v.x and
// vslide1down.vx take their scalar from the integer register file, which is how data
// enters vector registers in this implementation (there are no vector loads/stores).
// Timing: one command at a time (cmd_ready while idle); all source registers are read
// when the command is accepted; each beat takes one execute cycle (two for the fused
// vfmacc) and writes its elements to vd. op_done pulses after the last beat (after the
// result handshake for vmv.x.s).
module vpu
  import basilisk_pkg::*;
  import gecko_pkg::*;
  import vpu_pkg::*;
#(
  parameter int unsigned DATAPATHS = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  vpu_command_t      cmd,
  output logic              res_valid,
  input  logic              res_ready,
  output gecko_reg_result_t res,
  output logic              op_done
);
  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_INT} state_e;
  localparam logic [31:0] FP_ONE      = 32'h3f80_0000;
  localparam logic [31:0] FP_NEG_ZERO = 32'h8000_0000;
  localparam int unsigned BEATS       = LANES / DATAPATHS;
  localparam int unsigned BW          = (BEATS > 1) ? $clog2(BEATS) : 1;

  state_e       state;
  vpu_command_t cmd_q;
  logic         second_q;
  logic [BW-1:0] beat_q;
  logic [31:0]  v1_q [LANES];
  logic [31:0]  v2_q [LANES];
  logic [31:0]  vd_q [LANES];
  logic [LANES*32-1:0] vregs [32];
  logic [31:0]  dp_res [DATAPATHS];
  logic         last_beat;

  assign last_beat = (beat_q == BW'(BEATS - 1));

  // One fused multiply-adder per datapath; datapath d handles element beat*DATAPATHS+d
  for (genvar d = 0; d < DATAPATHS; d++) begin : g_dp
    logic [4:0]  e;
    logic [31:0] a1, a2, ad, anext;
    assign e     = 5'(int'(beat_q) * DATAPATHS + d);
    assign a1    = v1_q[e[3:0]];
    assign a2    = v2_q[e[3:0]];
    assign ad    = vd_q[e[3:0]];
    assign anext = (e == 5'(LANES - 1)) ? cmd_q.scalar : v2_q[4'(e + 5'd1)];
    // Operand selection for the single multiply-adder: x*y + (+/-)z
    logic [31:0] x, y, z, fma;
    assign x   = (cmd_q.op == VOP_FMACC) ? a1 : a2;
    assign y   = (cmd_q.op inside {VOP_FADD, VOP_FSUB}) ? FP_ONE : (cmd_q.op == VOP_FMUL) ? a1 : a2;
    assign z   = (cmd_q.op == VOP_FMACC) ? ad : (cmd_q.op == VOP_FMUL) ? FP_NEG_ZERO : a1;
    assign fma = fp_fma(x, y, z, 1'b0, cmd_q.op == VOP_FSUB, 3'(RM_RNE));
    always_comb begin
      unique case (cmd_q.op)
        VOP_FADD, VOP_FSUB, VOP_FMUL, VOP_FMACC: dp_res[d] = fma;
        VOP_MV_V_X:     dp_res[d] = cmd_q.scalar;
        VOP_SLIDE1DOWN: dp_res[d] = anext;
        default:        dp_res[d] = a2;
      endcase
    end
  end

  assign cmd_ready = (state == S_IDLE);

  logic write_beat;
  assign write_beat = (state == S_EXEC) && (cmd_q.op != VOP_MV_X_S) &&
                      !(cmd_q.op == VOP_FMACC && !second_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cmd_q    <= '0;
      second_q <= 1'b0;
      beat_q   <= '0;
      op_done  <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        v1_q[l] <= '0;
        v2_q[l] <= '0;
        vd_q[l] <= '0;
      end
    end else begin
      op_done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cmd_q    <= cmd;
          second_q <= 1'b0;
          beat_q   <= '0;
          for (int l = 0; l < LANES; l++) begin
            v1_q[l] <= vregs[cmd.vs1][l*32 +: 32];
            v2_q[l] <= vregs[cmd.vs2][l*32 +: 32];
            vd_q[l] <= vregs[cmd.vd][l*32 +: 32];
          end
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (cmd_q.op == VOP_MV_X_S) begin
            state <= S_INT;
          end else if (cmd_q.op == VOP_FMACC && !second_q) begin
            second_q <= 1'b1;
          end else begin
            second_q <= 1'b0;
            if (last_beat) begin
              state   <= S_IDLE;
              op_done <= 1'b1;
            end else begin
              beat_q <= beat_q + BW'(1);
            end
          end
        end
        S_INT: if (res_ready) begin
          state   <= S_IDLE;
          op_done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Vector register file write port: the elements of one beat per cycle
  always_ff @(posedge clk) begin
    if (write_beat)
      for (int d = 0; d < DATAPATHS; d++)
        vregs[cmd_q.vd][(int'(beat_q) * DATAPATHS + d) * 32 +: 32] <= dp_res[d];
  end

  assign res_valid = (state == S_INT);
  assign res.rd    = cmd_q.rd;
  assign res.value = v2_q[0];
  assign res.write = 1'b1;
endmodule
