// Ellipse fitting, first part: centre and second moments of one contour.
//
// Contour tokens (x, y) arrive one per cycle; an end-of-packet token closes
// the contour. For every pixel the block accumulates n, Sx, Sy, Sxx, Syy and
// Sxy: three multiplications and five additions per pixel. The moments are
// computed in the cheaper form
//     mxx = Sxx/n - xavg^2   (instead of sum((x - xavg)^2)/n),
// and likewise myy and mxy, so no per-pixel subtraction is needed and the
// division, squaring and subtraction are paid once per contour. After the
// end-of-packet token, one shared serial divider forms Sx/n, Sy/n, Sxx/n,
// Syy/n and Sxy/n in turn (DIVW cycles each), then three products and three
// subtractions give the moments.
//
// The accumulate-then-correct transformation follows the design. The number
// format is this design's own: fixed point with FRAC fraction bits, every
// division and shift truncating, where the design used reduced-width floating
// point. The orientation and axis lengths (arctangent and square root) are
// computed from these results by ellipse_axes.
//
// Interface: input stream in_valid/in_ready (in_ready is low while a result is
// computed or waits to be taken); a packet with no pixels produces no result.
// Result stream out_valid/out_ready. Latency from the end-of-packet token to
// out_valid: 5*(DIVW+1) + 2 cycles.
module ellipse_moments
  import hpdf_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned FRAC = 8,
  parameter int unsigned XW   = $clog2(W),
  parameter int unsigned YW   = $clog2(H),
  parameter int unsigned NW   = $clog2(W * H + 1),
  parameter int unsigned CW   = (XW > YW) ? XW : YW,
  parameter int unsigned MW   = 2 * CW + FRAC + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // contour tokens
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [XW-1:0]        in_x,
  input  logic [YW-1:0]        in_y,
  input  logic                 in_eop,
  // ellipse moments
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NW-1:0]        out_n,
  output logic [XW+FRAC-1:0]   out_xavg,
  output logic [YW+FRAC-1:0]   out_yavg,
  output logic signed [MW-1:0] out_mxx,
  output logic signed [MW-1:0] out_myy,
  output logic signed [MW-1:0] out_mxy
);

  localparam int unsigned ACC_W = 2 * CW + NW;
  localparam int unsigned DIVW  = ACC_W + FRAC;
  localparam int unsigned CNTW  = $clog2(DIVW + 1);

  typedef enum logic [1:0] {S_ACC, S_DIV, S_FIN, S_OUT} state_e;
  state_e state;

  logic [NW-1:0]    n;
  logic [ACC_W-1:0] acc [5];   // Sx, Sy, Sxx, Syy, Sxy
  logic [DIVW-1:0]  quo [5];   // Sx/n, Sy/n, Sxx/n, Syy/n, Sxy/n (Q.FRAC)

  // serial restoring divider
  logic [2:0]       sel;
  logic [CNTW-1:0]  bitcnt;
  logic [DIVW-1:0]  dvd;       // dividend, shifted out msb first
  logic [DIVW-1:0]  q;
  logic [NW-1:0]    rem;
  logic [NW:0]      rem_sh;
  logic             ge;
  assign rem_sh = {rem, dvd[DIVW-1]};
  assign ge     = (rem_sh >= {1'b0, n});

  assign in_ready = (state == S_ACC);
  assign out_valid = (state == S_OUT);

  // final correction products
  logic [2*(XW+FRAC)-1:0]       pxx;
  logic [2*(YW+FRAC)-1:0]       pyy;
  logic [XW+YW+2*FRAC-1:0]      pxy;
  logic [2*(XW+FRAC)-1:0] xa;
  logic [2*(YW+FRAC)-1:0] ya;
  assign xa  = (2*(XW+FRAC))'(quo[0][XW+FRAC-1:0]);
  assign ya  = (2*(YW+FRAC))'(quo[1][YW+FRAC-1:0]);
  assign pxx = xa * xa;
  assign pyy = ya * ya;
  assign pxy = (XW+YW+2*FRAC)'(xa) * (XW+YW+2*FRAC)'(ya);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACC;
      n <= '0;
      for (int i = 0; i < 5; i++) begin
        acc[i] <= '0;
        quo[i] <= '0;
      end
      sel <= '0; bitcnt <= '0; dvd <= '0; q <= '0; rem <= '0;
      out_n <= '0; out_xavg <= '0; out_yavg <= '0;
      out_mxx <= '0; out_myy <= '0; out_mxy <= '0;
    end else begin
      unique case (state)
        S_ACC: if (in_valid) begin
          if (!in_eop) begin
            n      <= n + 1'b1;
            acc[0] <= acc[0] + ACC_W'(in_x);
            acc[1] <= acc[1] + ACC_W'(in_y);
            acc[2] <= acc[2] + ACC_W'(in_x) * ACC_W'(in_x);
            acc[3] <= acc[3] + ACC_W'(in_y) * ACC_W'(in_y);
            acc[4] <= acc[4] + ACC_W'(in_x) * ACC_W'(in_y);
          end else if (n != '0) begin
            sel    <= '0;
            bitcnt <= '0;
            dvd    <= {acc[0], FRAC'(0)};
            q      <= '0;
            rem    <= '0;
            state  <= S_DIV;
          end
        end

        S_DIV: begin
          if (bitcnt == CNTW'(DIVW)) begin
            quo[sel] <= q;
            bitcnt   <= '0;
            q        <= '0;
            rem      <= '0;
            if (sel == 3'd4) begin
              state <= S_FIN;
            end else begin
              sel <= sel + 1'b1;
              dvd <= {acc[sel + 1'b1], FRAC'(0)};
            end
          end else begin
            dvd    <= dvd << 1;
            bitcnt <= bitcnt + 1'b1;
            if (ge) begin
              rem <= NW'(rem_sh - {1'b0, n});
              q   <= {q[DIVW-2:0], 1'b1};
            end else begin
              rem <= NW'(rem_sh);
              q   <= {q[DIVW-2:0], 1'b0};
            end
          end
        end

        S_FIN: begin
          out_n    <= n;
          out_xavg <= quo[0][XW+FRAC-1:0];
          out_yavg <= quo[1][YW+FRAC-1:0];
          out_mxx  <= $signed(MW'(quo[2])) - $signed(MW'(pxx >> FRAC));
          out_myy  <= $signed(MW'(quo[3])) - $signed(MW'(pyy >> FRAC));
          out_mxy  <= $signed(MW'(quo[4])) - $signed(MW'(pxy >> FRAC));
          n <= '0;
          for (int i = 0; i < 5; i++) acc[i] <= '0;
          state <= S_OUT;
        end

        S_OUT: if (out_ready) state <= S_ACC;

        default: state <= S_ACC;
      endcase
    end
  end

endmodule
