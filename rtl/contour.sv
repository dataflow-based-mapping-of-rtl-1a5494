// Contour following over one marked image held in a memory bank.
//
// The image is scanned pixel by pixel in raster order until a region pixel is
// met; the periphery of that region is then traced and the (x, y) position of
// every boundary pixel is sent out, one token per pixel, followed by an
// end-of-packet token. Scanning then resumes after the start pixel. Each
// boundary pixel is also rewritten in the image with the code PIX_CONTOUR, so
// the output image shows the traced contours and no region is traced twice.
//
// The controller is a self-timed loop of four actors:
//   A  scan   reads the image a word (four pixels) at a time, several reads in
//             flight; it stays in A until a start pixel is found. A start
//             pixel holds PIX_REGION and has PIX_BG (or the image edge) to
//             its left.
//   B  start  waits for reads still in flight, then seeds the trace at the
//             start pixel with the search origin pointing west.
//   C  search Moore-neighbour search: looks at the eight neighbours clockwise
//             (image y grows downward), beginning one step past the last
//             background neighbour, one memory read per neighbour; pixels
//             outside the image count as background. C either moves to a
//             marked neighbour (to D when that pixel is new, straight back
//             to C when it already carries PIX_CONTOUR) or, when the trace is
//             back at the start pixel about to repeat its first move, or the
//             start pixel has no marked neighbour, ends the contour (back to A).
//   D  emit   writes PIX_CONTOUR into the pixel's byte and hands its (x, y)
//             to the output; it waits for both to be accepted.
// The raster scan, the order of the flow through A-D, the end-of-packet
// marker and the marking of traced pixels follow the design; the particular
// tracing rule (Moore neighbours, stop on repeating the first move, a guard
// of 4*W*H moves) and the pixel codes are this design's choices.
//
// Memory: one bank, four pixels per word (pixel i of the image at word base+i/4,
// byte i%4, byte 0 in bits 7:0). Read data return in order, any latency.
// Output: valid/ready stream; out_eop=1 marks the end of a contour (x, y are
// then the start pixel). start begins one image; done pulses when the scan
// has passed the last pixel. W must be a multiple of four.
module contour
  import hpdf_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H,
  parameter int unsigned XW = $clog2(W),
  parameter int unsigned YW = $clog2(H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ZBT_ADDR_W-1:0] base_addr,
  output logic                  busy,
  output logic                  done,
  // memory port
  output mem_req_t              req,
  input  logic                  req_ready,
  input  mem_rsp_t              rsp,
  // contour token stream
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [XW-1:0]         out_x,
  output logic [YW-1:0]         out_y,
  output logic                  out_eop
);

  localparam int unsigned NPIX     = W * H;
  localparam int unsigned WPR      = W / PIX_PER_WORD;   // words per row
  localparam int unsigned NWORDS   = NPIX / PIX_PER_WORD;
  localparam int unsigned WORDW    = $clog2(NWORDS + 1);
  localparam int unsigned MAX_OUT  = 8;                  // scan reads in flight
  localparam int unsigned MAXSTEP  = 4 * NPIX;
  localparam int unsigned STEPW    = $clog2(MAXSTEP + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_START, S_EMIT, S_LOOK, S_WAIT, S_EOP, S_FINISH
  } state_e;

  state_e state;

  // ---- scan (actor A) ----
  logic [WORDW-1:0] iss_word, proc_word;
  logic [XW-1:0]    proc_x;          // x of byte 0 of proc_word
  logic [YW-1:0]    proc_y;
  logic [1:0]       proc_off;        // first byte of proc_word still to scan
  logic [7:0]       left_v;          // pixel left of byte proc_off
  logic [3:0]       outstanding;

  // ---- trace (actors B, C, D) ----
  logic [XW-1:0]    cx, p0x, p1x, nx_r;
  logic [YW-1:0]    cy, p0y, p1y, ny_r;
  logic [2:0]       s_dir;           // direction of last background neighbour
  logic [3:0]       k;               // neighbour being looked at: s_dir + k
  logic [2:0]       dir_r;
  logic             first_move;
  logic [STEPW-1:0] steps;
  logic             wr_done, out_done;
  logic [ZBT_ADDR_W-1:0] base_r;

  // direction table: 0=E 1=SE 2=S 3=SW 4=W 5=NW 6=N 7=NE
  function automatic logic signed [1:0] dx_of(input logic [2:0] d);
    case (d)
      3'd0, 3'd1, 3'd7: return 2'sd1;
      3'd3, 3'd4, 3'd5: return -2'sd1;
      default:          return 2'sd0;
    endcase
  endfunction

  function automatic logic signed [1:0] dy_of(input logic [2:0] d);
    case (d)
      3'd1, 3'd2, 3'd3: return 2'sd1;
      3'd5, 3'd6, 3'd7: return -2'sd1;
      default:          return 2'sd0;
    endcase
  endfunction

  function automatic logic [ZBT_ADDR_W-1:0] word_of(input logic [XW-1:0] x,
                                                    input logic [YW-1:0] y);
    return ZBT_ADDR_W'(y) * ZBT_ADDR_W'(WPR) + ZBT_ADDR_W'(x >> 2);
  endfunction

  // neighbour under inspection
  logic [2:0]        dir_c;
  logic signed [XW+1:0] nxs;
  logic signed [YW+1:0] nys;
  logic              n_inside;
  always_comb begin
    dir_c    = s_dir + k[2:0];
    nxs      = $signed({2'b00, cx}) + (XW+2)'(dx_of(dir_c));
    nys      = $signed({2'b00, cy}) + (YW+2)'(dy_of(dir_c));
    n_inside = (nxs >= 0) && (nxs < (XW+2)'(W)) && (nys >= 0) && (nys < (YW+2)'(H));
  end

  // scan: find the first start pixel of the returned word
  logic [7:0] wv [PIX_PER_WORD];
  logic       found;
  logic [1:0] found_k;
  always_comb begin
    logic [7:0] lft;
    found   = 1'b0;
    found_k = '0;
    for (int i = 0; i < PIX_PER_WORD; i++) wv[i] = rsp.rdata[8*i +: 8];
    for (int i = PIX_PER_WORD - 1; i >= 0; i--) begin
      if (i == 0 && proc_x == '0)  lft = PIX_BG;
      else if (i == int'(proc_off)) lft = left_v;
      else if (i > 0)               lft = wv[i-1];
      else                          lft = left_v;
      if (i >= int'(proc_off) && wv[i] == PIX_REGION && lft == PIX_BG) begin
        found   = 1'b1;
        found_k = 2'(i);
      end
    end
  end

  // pixel byte returned for the neighbour read
  logic [7:0] nval;
  assign nval = rsp.rdata[8*nx_r[1:0] +: 8];

  // memory request
  always_comb begin
    req       = '0;
    req.be    = '1;
    if (state == S_SCAN && iss_word < WORDW'(NWORDS) && outstanding < 4'(MAX_OUT)) begin
      req.valid = 1'b1;
      req.addr  = base_r + ZBT_ADDR_W'(iss_word);
    end else if (state == S_LOOK && n_inside) begin
      req.valid = 1'b1;
      req.addr  = base_r + word_of(XW'(nxs), YW'(nys));
    end else if (state == S_EMIT && !wr_done) begin
      req.valid = 1'b1;
      req.we    = 1'b1;
      req.addr  = base_r + word_of(cx, cy);
      req.be    = ZBT_BE_W'(1) << cx[1:0];
      req.wdata = {ZBT_BE_W{PIX_CONTOUR}};
    end
  end

  assign out_valid = (state == S_EMIT && !out_done) || (state == S_EOP);
  assign out_eop   = (state == S_EOP);
  assign out_x     = (state == S_EOP) ? p0x : cx;
  assign out_y     = (state == S_EOP) ? p0y : cy;
  assign busy      = (state != S_IDLE);

  logic rd_issue;
  assign rd_issue = req.valid && !req.we && req_ready;

  // emit handshakes: marking write accepted / token taken, now or earlier
  logic wd, od;
  assign wd = wr_done || req_ready;
  assign od = out_done || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iss_word <= '0; proc_word <= '0; proc_x <= '0; proc_y <= '0;
      proc_off <= '0; left_v <= PIX_BG; outstanding <= '0;
      cx <= '0; cy <= '0; p0x <= '0; p0y <= '0; p1x <= '0; p1y <= '0;
      nx_r <= '0; ny_r <= '0; dir_r <= '0;
      s_dir <= 3'd4; k <= '0; first_move <= 1'b0; steps <= '0;
      wr_done <= 1'b0; out_done <= 1'b0; done <= 1'b0; base_r <= '0;
    end else begin
      done <= 1'b0;
      outstanding <= outstanding + 4'(rd_issue) - 4'(rsp.valid);

      unique case (state)
        S_IDLE: if (start) begin
          base_r <= base_addr;
          iss_word <= '0; proc_word <= '0; proc_x <= '0; proc_y <= '0;
          proc_off <= '0; left_v <= PIX_BG;
          state <= S_SCAN;
        end

        // ---- A: raster scan ----
        S_SCAN: begin
          if (rd_issue) iss_word <= iss_word + 1'b1;
          if (rsp.valid) begin
            if (found) begin
              p0x <= proc_x + XW'(found_k);
              p0y <= proc_y;
              state <= S_START;
            end else begin
              left_v   <= wv[PIX_PER_WORD-1];
              proc_off <= '0;
              if (proc_word == WORDW'(NWORDS - 1)) begin
                state <= S_FINISH;
              end else begin
                proc_word <= proc_word + 1'b1;
                if (proc_x == XW'(W - PIX_PER_WORD)) begin
                  proc_x <= '0;
                  proc_y <= proc_y + 1'b1;
                end else begin
                  proc_x <= proc_x + XW'(PIX_PER_WORD);
                end
              end
            end
          end
        end

        // ---- B: start a trace once the scan reads have drained ----
        S_START: if (outstanding == '0 || (outstanding == 4'd1 && rsp.valid)) begin
          cx <= p0x; cy <= p0y;
          s_dir <= 3'd4;
          first_move <= 1'b1;
          steps <= '0;
          wr_done <= 1'b0; out_done <= 1'b0;
          state <= S_EMIT;
        end

        // ---- D: mark the pixel and emit its position ----
        S_EMIT: begin
          wr_done  <= wd;
          out_done <= od;
          if (wd && od) begin
            k <= 4'd1;
            state <= S_LOOK;
          end
        end

        // ---- C: look at the next neighbour ----
        S_LOOK: begin
          if (!n_inside) begin
            if (k == 4'd7) state <= S_EOP;     // isolated pixel
            else k <= k + 1'b1;
          end else if (req_ready) begin
            nx_r <= XW'(nxs); ny_r <= YW'(nys); dir_r <= dir_c;
            state <= S_WAIT;
          end
        end

        S_WAIT: if (rsp.valid) begin
          if (nval == PIX_BG) begin
            if (k == 4'd7) state <= S_EOP;
            else begin
              k <= k + 1'b1;
              state <= S_LOOK;
            end
          end else if (!first_move && cx == p0x && cy == p0y &&
                       nx_r == p1x && ny_r == p1y) begin
            state <= S_EOP;                    // contour closed
          end else if (steps == STEPW'(MAXSTEP)) begin
            state <= S_EOP;                    // guard
          end else begin
            if (first_move) begin
              p1x <= nx_r; p1y <= ny_r;
              first_move <= 1'b0;
            end
            steps <= steps + 1'b1;
            cx <= nx_r; cy <= ny_r;
            s_dir <= dir_r[0] ? dir_r + 3'd5 : dir_r + 3'd6;
            k <= 4'd1;
            if (nval == PIX_REGION) begin
              wr_done <= 1'b0; out_done <= 1'b0;
              state <= S_EMIT;
            end else begin
              state <= S_LOOK;
            end
          end
        end

        // ---- end of packet, then resume the scan after the start pixel ----
        S_EOP: if (out_ready) begin
          if (p0x == XW'(W - 1)) begin
            if (p0y == YW'(H - 1)) state <= S_FINISH;
            else begin
              proc_x <= '0; proc_y <= p0y + 1'b1; proc_off <= '0;
              proc_word <= WORDW'(word_of('0, p0y + 1'b1));
              iss_word  <= WORDW'(word_of('0, p0y + 1'b1));
              left_v <= PIX_BG;
              state <= S_SCAN;
            end
          end else begin
            proc_x <= (p0x + 1'b1) & ~XW'(3);
            proc_y <= p0y;
            proc_off <= 2'(p0x + 1'b1);
            proc_word <= WORDW'(word_of(p0x + 1'b1, p0y));
            iss_word  <= WORDW'(word_of(p0x + 1'b1, p0y));
            left_v <= PIX_CONTOUR;
            state <= S_SCAN;
          end
        end

        S_FINISH: if (outstanding == '0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_x) && $stable(out_y) && $stable(out_eop)));

endmodule
