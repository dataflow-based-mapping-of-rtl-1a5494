// Ellipse fitting, second part: orientation and axis lengths from the moments.
//
// Takes the centre and second moments of one contour (from ellipse_moments)
// and adds the three shape parameters of the fitted ellipse:
//     rot = 1/2 * atan2(2*mxy, mxx - myy)                 orientation
//     R   = sqrt((mxx - myy)^2 + (2*mxy)^2)
//     ax  = sqrt(mxx + myy + R),  ay = sqrt(mxx + myy - R)  semi-axes
// mxx + myy +/- R is twice the larger / smaller eigenvalue of the moment
// matrix. For points spread evenly along an ellipse outline with semi-axes a
// and b the eigenvalues are a^2/2 and b^2/2, so ax and ay estimate a and b
// directly from boundary pixels. A negative operand (rounding) gives 0.
//
// How: one CORDIC unit in vectoring mode (NIT = 16 iterations, one per cycle)
// rotates the vector (mxx - myy, 2*mxy) onto the x axis. The accumulated angle
// is atan2, and the final x is R times the CORDIC gain, which is removed by
// one multiplication by round(2^16 / 1.6467602578) = 39797. A vector in the
// left half plane is first turned by 180 degrees. The angle table holds
// round(atan(2^-i) * 2^16) for i = 0..15. Then two bit-serial restoring square
// roots run side by side, one result bit per cycle.
//
// Formats: inputs as produced by ellipse_moments (moments signed, FRAC
// fraction bits). out_rot is signed radians with 16 fraction bits, in
// (-pi/2, pi/2]. out_ax and out_ay are unsigned with FRAC fraction bits. The
// centre, count and moments are passed through with the result.
//
// The orientation and axis parameters follow the design. It used floating
// point and does not give the formulas: the eigenvalue form, the
// boundary-point scaling of the axes, the CORDIC and square-root hardware and
// fixed point are this design's own.
//
// Interface: in_valid/in_ready (ready only when idle), out_valid/out_ready.
// Latency from an accepted input to out_valid: NIT + RW + 3 cycles.
module ellipse_axes
  import hpdf_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned FRAC = 8,
  parameter int unsigned XW   = $clog2(W),
  parameter int unsigned YW   = $clog2(H),
  parameter int unsigned NW   = $clog2(W * H + 1),
  parameter int unsigned MW   = 2 * ((XW > YW) ? XW : YW) + FRAC + 1,
  // square-root operand and result widths
  parameter int unsigned SW   = ((MW + 2 + FRAC) + 1) / 2 * 2,
  parameter int unsigned RW   = SW / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [NW-1:0]        in_n,
  input  logic [XW+FRAC-1:0]   in_xavg,
  input  logic [YW+FRAC-1:0]   in_yavg,
  input  logic signed [MW-1:0] in_mxx,
  input  logic signed [MW-1:0] in_myy,
  input  logic signed [MW-1:0] in_mxy,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NW-1:0]        out_n,
  output logic [XW+FRAC-1:0]   out_xavg,
  output logic [YW+FRAC-1:0]   out_yavg,
  output logic signed [MW-1:0] out_mxx,
  output logic signed [MW-1:0] out_myy,
  output logic signed [MW-1:0] out_mxy,
  output logic signed [17:0]   out_rot,
  output logic [RW-1:0]        out_ax,
  output logic [RW-1:0]        out_ay
);

  localparam int unsigned NIT  = 16;          // CORDIC iterations
  localparam int unsigned GB   = 16;          // guard bits below the input LSB
  localparam int unsigned VW   = MW + 3 + GB; // CORDIC x/y width (signed)
  localparam int unsigned ZW   = 19;          // angle, signed Q.16, |z| <= pi
  localparam logic signed [ZW-1:0] PI_Q16 = 19'sd205887;
  localparam logic [16:0]          INVK   = 17'd39797;
  localparam int unsigned CNTW = $clog2(((NIT > RW) ? NIT : RW) + 1);

  function automatic logic signed [ZW-1:0] atan_q16(input logic [3:0] i);
    unique case (i)
      4'd0:  return 19'sd51472;
      4'd1:  return 19'sd30386;
      4'd2:  return 19'sd16055;
      4'd3:  return 19'sd8150;
      4'd4:  return 19'sd4091;
      4'd5:  return 19'sd2047;
      4'd6:  return 19'sd1024;
      4'd7:  return 19'sd512;
      4'd8:  return 19'sd256;
      4'd9:  return 19'sd128;
      4'd10: return 19'sd64;
      4'd11: return 19'sd32;
      4'd12: return 19'sd16;
      4'd13: return 19'sd8;
      4'd14: return 19'sd4;
      default: return 19'sd2;
    endcase
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_PREP, S_ROT, S_SCALE, S_SQRT, S_OUT} state_e;
  state_e state;

  logic [CNTW-1:0]        cnt;
  logic signed [VW-1:0]   vx, vy;
  logic signed [ZW-1:0]   vz;
  logic signed [MW:0]     trace;      // mxx + myy
  logic [SW-1:0]          op_a, op_b; // square-root operands, shifted out 2 bits/cycle
  logic [RW-1:0]          root_a, root_b;
  logic [RW-1:0]          rem_a, rem_b;  // < 2^RW before the last step

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);

  // CORDIC input vector, with GB guard bits
  logic signed [VW-1:0] px, py;
  assign px = (VW'(out_mxx) - VW'(out_myy)) <<< GB;
  assign py = (VW'(out_mxy) <<< 1) <<< GB;

  // CORDIC step
  logic signed [VW-1:0] vx_sh, vy_sh;
  assign vx_sh = vx >>> cnt;
  assign vy_sh = vy >>> cnt;

  // magnitude: R = vx / K, back to FRAC fraction bits
  logic signed [VW+17:0] mag_full;
  logic signed [MW+1:0]  mag;
  assign mag_full = vx * $signed({1'b0, INVK});
  assign mag      = (MW + 2)'(mag_full >>> (16 + GB));

  // square-root operands: (trace +/- R) << FRAC, negative clamped to zero
  logic signed [MW+2:0] sum_p, sum_m;
  assign sum_p = (MW + 3)'(trace) + (MW + 3)'(mag);
  assign sum_m = (MW + 3)'(trace) - (MW + 3)'(mag);

  // square-root steps
  logic [RW+1:0] trial_a, trial_b, rsh_a, rsh_b;
  assign rsh_a   = {rem_a, op_a[SW-1 -: 2]};
  assign rsh_b   = {rem_b, op_b[SW-1 -: 2]};
  assign trial_a = {root_a, 2'b01};
  assign trial_b = {root_b, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0;
      vx <= '0; vy <= '0; vz <= '0; trace <= '0;
      op_a <= '0; op_b <= '0; root_a <= '0; root_b <= '0; rem_a <= '0; rem_b <= '0;
      out_n <= '0; out_xavg <= '0; out_yavg <= '0;
      out_mxx <= '0; out_myy <= '0; out_mxy <= '0;
      out_rot <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          out_n <= in_n; out_xavg <= in_xavg; out_yavg <= in_yavg;
          out_mxx <= in_mxx; out_myy <= in_myy; out_mxy <= in_mxy;
          state <= S_PREP;
        end

        // vector (mxx - myy, 2 mxy); turn it into the right half plane
        S_PREP: begin
          trace <= (MW + 1)'(out_mxx) + (MW + 1)'(out_myy);
          if (px < 0) begin
            vx <= -px; vy <= -py;
            vz <= (py >= 0) ? PI_Q16 : -PI_Q16;
          end else begin
            vx <= px; vy <= py; vz <= '0;
          end
          cnt <= '0;
          state <= S_ROT;
        end

        S_ROT: begin
          if (vy >= 0) begin
            vx <= vx + vy_sh; vy <= vy - vx_sh; vz <= vz + atan_q16(cnt[3:0]);
          end else begin
            vx <= vx - vy_sh; vy <= vy + vx_sh; vz <= vz - atan_q16(cnt[3:0]);
          end
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(NIT - 1)) state <= S_SCALE;
        end

        S_SCALE: begin
          out_rot <= 18'(vz >>> 1);
          op_a <= (sum_p > 0) ? SW'(sum_p) << FRAC : '0;
          op_b <= (sum_m > 0) ? SW'(sum_m) << FRAC : '0;
          root_a <= '0; root_b <= '0; rem_a <= '0; rem_b <= '0;
          cnt <= '0;
          state <= S_SQRT;
        end

        S_SQRT: begin
          op_a <= op_a << 2;
          op_b <= op_b << 2;
          if (rsh_a >= trial_a) begin rem_a <= RW'(rsh_a - trial_a); root_a <= {root_a[RW-2:0], 1'b1}; end
          else begin rem_a <= RW'(rsh_a); root_a <= {root_a[RW-2:0], 1'b0}; end
          if (rsh_b >= trial_b) begin rem_b <= RW'(rsh_b - trial_b); root_b <= {root_b[RW-2:0], 1'b1}; end
          else begin rem_b <= RW'(rsh_b); root_b <= {root_b[RW-2:0], 1'b0}; end
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(RW - 1)) state <= S_OUT;
        end

        S_OUT: begin
          if (out_ready) state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // the roots are complete, and held, while out_valid is high
  assign out_ax = root_a;
  assign out_ay = root_b;

endmodule
