// Region extraction for one pixel position: a four-stage pipeline.
//
// Region takes the co-located pixels of an image group (Image 1 = luminance
// Y, Image 2 = background, Image 3 = downsampled Cr/Cb) and produces two
// marked images, Image 1' and Image 3'. The work is split into five small
// actors, placed in the pipeline as the dataflow graph of Region arranges them:
//
//   stage 1  input registers (the delays on the buffer-read edges)
//   stage 2  A = |Image1 - Image2|          B = Image3 > thold1
//   stage 3  C = (A > thold2) & (thold3 > Image1 > thold4)
//            D = A > thold5
//   stage 4  E = ~(C & D) | ~(C & B)  -> Image 3'
//            C & D                     -> Image 1'
//
// The actor equations follow the design; the combination written to Image 1'
// (C and D both true) and the output code (PIX_REGION for a marked pixel,
// PIX_BG otherwise) are this design's choices. All comparisons are unsigned
// and strict.
//
// Interface: one pixel triple per cycle on in_valid; the result leaves on
// out_valid exactly four clock edges later (latency 4, throughput 1 pixel per
// cycle). Several instances side by side process several pixels of one memory
// word in parallel. Thresholds are static while a frame streams through.
module region_pixel
  import hpdf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  region_thr_t thr,
  input  logic        in_valid,
  input  logic [7:0]  in_y,     // Image 1
  input  logic [7:0]  in_bg,    // Image 2
  input  logic [7:0]  in_c,     // Image 3
  output logic        out_valid,
  output logic [7:0]  out_y,    // Image 1'
  output logic [7:0]  out_c     // Image 3'
);

  // stage 1: buffer-read delays
  logic       v1;
  logic [7:0] y1, bg1, c1;
  // stage 2: A, B
  logic       v2, b2;
  logic [7:0] a2, y2;
  // stage 3: C, D (B carried along)
  logic       v3, c3, d3, b3;

  logic [7:0] a_diff;
  assign a_diff = (y1 > bg1) ? (y1 - bg1) : (bg1 - y1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
      y1 <= '0; bg1 <= '0; c1 <= '0;
      a2 <= '0; y2 <= '0; b2 <= 1'b0;
      c3 <= 1'b0; d3 <= 1'b0; b3 <= 1'b0;
      out_y <= PIX_BG; out_c <= PIX_BG;
    end else begin
      // stage 1
      v1  <= in_valid;
      y1  <= in_y;
      bg1 <= in_bg;
      c1  <= in_c;
      // stage 2: actors A and B
      v2 <= v1;
      a2 <= a_diff;
      b2 <= (c1 > thr.t1);
      y2 <= y1;
      // stage 3: actors C and D
      v3 <= v2;
      c3 <= (a2 > thr.t2) && (thr.t3 > y2) && (y2 > thr.t4);
      d3 <= (a2 > thr.t5);
      b3 <= b2;
      // stage 4: actor E and the Image 1' write value
      out_valid <= v3;
      out_y <= (c3 && d3) ? PIX_REGION : PIX_BG;
      out_c <= (!(c3 && d3) || !(c3 && b3)) ? PIX_REGION : PIX_BG;
    end
  end

endmodule
