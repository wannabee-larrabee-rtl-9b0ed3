// basilisk_divsqrt: iterative significand divider and square root of the FPU.
// Division and square root are the long-latency operations of the FPU; this unit
// produces one result bit per clock. Division computes q = floor(ma * 2^26 / mb)
// (27 bits, restoring division); square root computes r = floor(sqrt(rad)) of a
// 54-bit radicand (27 bits, digit-by-digit). The sticky output is set when the
// remainder is nonzero, so the caller can round correctly. Both the one-bit-per-cycle
// algorithm and the operand widths are this implementation's choice; the source
// design only says that division and square root iterate.
// Interface: start (one-cycle pulse while idle) with is_sqrt, ma/mb (24-bit
// significands with hidden one) or rad; done pulses for one cycle 27 cycles after
// start, with result and sticky valid in that cycle and held until the next start.
module basilisk_divsqrt (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        is_sqrt,
  input  logic [23:0] ma,
  input  logic [23:0] mb,
  input  logic [53:0] rad,
  output logic        busy,
  output logic        done,
  output logic [26:0] result,
  output logic        sticky
);
  localparam int unsigned STEPS = 27;

  logic [4:0]  count;
  logic        sqrt_q;
  logic [23:0] div_q;
  logic [53:0] rad_q;
  logic [31:0] rem_q;
  logic [26:0] res_q;

  logic [31:0] rem_d;
  logic [26:0] res_d;
  logic [31:0] shifted, trial;

  always_comb begin
    rem_d = rem_q;
    res_d = res_q;
    shifted = '0;
    trial = '0;
    if (sqrt_q) begin
      shifted = {rem_q[29:0], rad_q[53:52]};
      trial   = {3'd0, res_q, 2'b01};
      if (shifted >= trial) begin
        rem_d = shifted - trial;
        res_d = {res_q[25:0], 1'b1};
      end else begin
        rem_d = shifted;
        res_d = {res_q[25:0], 1'b0};
      end
    end else begin
      // rem_q holds the partial remainder, always below 2*mb
      if (rem_q >= {8'd0, div_q}) begin
        rem_d = (rem_q - {8'd0, div_q}) << 1;
        res_d = {res_q[25:0], 1'b1};
      end else begin
        rem_d = rem_q << 1;
        res_d = {res_q[25:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      sqrt_q <= 1'b0;
      div_q  <= '0;
      rad_q  <= '0;
      rem_q  <= '0;
      res_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        count  <= 5'(STEPS - 1);
        sqrt_q <= is_sqrt;
        div_q  <= mb;
        rad_q  <= rad;
        rem_q  <= is_sqrt ? 32'd0 : {8'd0, ma};
        res_q  <= '0;
      end else if (busy) begin
        rem_q <= rem_d;
        res_q <= res_d;
        rad_q <= rad_q << 2;
        if (count == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          count <= count - 5'd1;
        end
      end
    end
  end

  assign result = res_q;
  assign sticky = (rem_q != 32'd0);
endmodule
