// Self-checking testbench for contour, on a 32 x 16 image.
// The image holds a solid block, a ring (outer edge and hole), a single
// pixel, a one-pixel-wide diagonal, an L shape touching the image border and
// a block in the bottom-right corner. A memory model with a three-cycle read
// latency and random stalls serves the block; the token output is stalled
// at random as well.
// Checks: the token stream matches, token by token, a software model of the
// scan-and-trace rule written here; the final image (contour pixels marked)
// matches the model's; the number of contours matches the count worked out
// by hand for this picture; every token names a pixel that was a region
// pixel; done arrives.
module tb_contour;
  import hpdf_pkg::*;

  localparam int unsigned W = 32, H = 16;
  localparam int unsigned XW = $clog2(W), YW = $clog2(H);
  localparam int unsigned NWORDS = W * H / 4;
  localparam int unsigned BASE = 100;
  localparam int unsigned RLAT = 3;
  localparam int unsigned EXP_CONTOURS = 7;  // block, ring outer, ring hole, dot, diagonal, L, corner
  // boundary pixels counted by hand: block 14, ring outer 24, ring hole 12
  // (the four hole corners touch the hole only diagonally), dot 1,
  // diagonal 5, L 13, corner block 12
  localparam int unsigned EXP_PIXELS = 14 + 24 + 12 + 1 + 5 + 13 + 12;

  logic clk = 1'b0, rst_n, start, busy, done;
  logic [ZBT_ADDR_W-1:0] base_addr;
  mem_req_t req;
  logic req_ready;
  mem_rsp_t rsp;
  logic out_valid, out_ready, out_eop;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;

  int checks = 0, failures = 0, cycle = 0;

  contour #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- memory model ----------------
  logic [31:0] mem [BASE + NWORDS];
  logic [31:0] rpipe_d [RLAT];
  logic        rpipe_v [RLAT];

  always @(negedge clk) req_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) begin
    for (int i = RLAT - 1; i > 0; i--) begin
      rpipe_v[i] <= rpipe_v[i-1];
      rpipe_d[i] <= rpipe_d[i-1];
    end
    rpipe_v[0] <= 1'b0;
    if (req.valid && req_ready) begin
      if (req.we) begin
        for (int b = 0; b < 4; b++) if (req.be[b]) mem[req.addr][8*b +: 8] <= req.wdata[8*b +: 8];
      end else begin
        rpipe_v[0] <= 1'b1;
        rpipe_d[0] <= mem[req.addr];
      end
    end
  end
  assign rsp.valid = rpipe_v[RLAT-1];
  assign rsp.rdata = rpipe_d[RLAT-1];

  // ---------------- picture and software model ----------------
  logic [7:0] img [H][W];      // model image, updated as the model traces
  logic [7:0] orig [H][W];
  typedef struct { int x, y; bit eop; } tok_t;
  tok_t expq[$];

  function automatic void set_px(int x, int y);
    img[y][x] = PIX_REGION;
  endfunction

  function automatic void draw_picture();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = PIX_BG;
    for (int y = 1; y <= 4; y++) for (int x = 2; x <= 6; x++) set_px(x, y);        // block
    for (int y = 1; y <= 7; y++) for (int x = 10; x <= 16; x++)                     // ring
      if (!(y >= 3 && y <= 5 && x >= 12 && x <= 14)) set_px(x, y);
    set_px(20, 2);                                                                  // dot
    for (int i = 0; i < 5; i++) set_px(23 + i, 1 + i);                              // diagonal
    for (int y = 8; y <= 15; y++) set_px(0, y);                                     // L
    for (int x = 0; x <= 5; x++) set_px(x, 15);
    for (int y = 12; y <= 15; y++) for (int x = 28; x <= 31; x++) set_px(x, y);     // corner
  endfunction

  function automatic bit in_img(int x, int y);
    return x >= 0 && x < W && y >= 0 && y < H;
  endfunction

  function automatic void emit(int x, int y);
    expq.push_back('{x: x, y: y, eop: 1'b0});
    img[y][x] = PIX_CONTOUR;
  endfunction

  function automatic void trace(int x0, int y0);
    int dxs[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int dys[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    int cx = x0, cy = y0, s = 4, p1x = -1, p1y = -1, steps = 0;
    bit first = 1'b1;
    emit(x0, y0);
    forever begin
      int nx = 0, ny = 0, d = 0;
      bit hit = 1'b0;
      for (int k = 1; k <= 7 && !hit; k++) begin
        d = (s + k) % 8;
        nx = cx + dxs[d];
        ny = cy + dys[d];
        if (in_img(nx, ny) && img[ny][nx] != PIX_BG) hit = 1'b1;
      end
      if (!hit) break;
      if (!first && cx == x0 && cy == y0 && nx == p1x && ny == p1y) break;
      if (steps == 4 * W * H) break;
      if (first) begin p1x = nx; p1y = ny; first = 1'b0; end
      steps++;
      cx = nx; cy = ny;
      s = (d % 2 == 1) ? (d + 5) % 8 : (d + 6) % 8;
      if (img[cy][cx] == PIX_REGION) emit(cx, cy);
    end
    expq.push_back('{x: x0, y: y0, eop: 1'b1});
  endfunction

  function automatic int run_model();
    int n = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (img[y][x] == PIX_REGION && (x == 0 || img[y][x-1] == PIX_BG)) begin
          trace(x, y);
          n++;
        end
    return n;
  endfunction

  // ---------------- output checking ----------------
  int tokens = 0, eops = 0, stalls = 0;
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      tok_t e;
      checks++;
      tokens++;
      if (out_eop) eops++;
      if (!out_eop && orig[out_y][out_x] != PIX_REGION) begin
        failures++;
        $display("FAIL: token (%0d,%0d) is not a region pixel", out_x, out_y);
      end
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: extra token (%0d,%0d,%0b)", out_x, out_y, out_eop);
      end else begin
        e = expq.pop_front();
        if (e.eop != out_eop || (!e.eop && (e.x != int'(out_x) || e.y != int'(out_y)))) begin
          failures++;
          $display("FAIL token %0d: got (%0d,%0d,eop=%0b) expected (%0d,%0d,eop=%0b)",
                   tokens, out_x, out_y, out_eop, e.x, e.y, e.eop);
        end
      end
    end
  end

  initial begin
    int ncont;
    rst_n = 1'b0; start = 1'b0; base_addr = ZBT_ADDR_W'(BASE);
    for (int i = 0; i < RLAT; i++) begin rpipe_v[i] = 1'b0; rpipe_d[i] = '0; end
    draw_picture();
    orig = img;
    for (int i = 0; i < BASE + NWORDS; i++) mem[i] = 32'hDEAD_BEEF;
    for (int wd = 0; wd < NWORDS; wd++)
      for (int b = 0; b < 4; b++)
        mem[BASE + wd][8*b +: 8] = img[(4*wd + b) / W][(4*wd + b) % W];
    ncont = run_model();
    checks++;
    if (ncont != EXP_CONTOURS) begin
      failures++;
      $display("FAIL: model finds %0d contours, %0d expected", ncont, EXP_CONTOURS);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d tokens missing", expq.size());
    end
    checks++;
    if (eops != EXP_CONTOURS) begin
      failures++;
      $display("FAIL: %0d contours, expected %0d", eops, EXP_CONTOURS);
    end
    checks++;
    if (tokens - eops != EXP_PIXELS) begin
      failures++;
      $display("FAIL: %0d boundary pixels, expected %0d", tokens - eops, EXP_PIXELS);
    end
    // final image
    for (int wd = 0; wd < NWORDS; wd++)
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (mem[BASE + wd][8*b +: 8] != img[(4*wd + b) / W][(4*wd + b) % W]) begin
          failures++;
          $display("FAIL: pixel %0d is %h, expected %h", 4*wd + b,
                   mem[BASE + wd][8*b +: 8], img[(4*wd + b) / W][(4*wd + b) % W]);
        end
      end
    checks++;
    if (mem[BASE - 1] != 32'hDEAD_BEEF) failures++;   // nothing written outside the image
    $display("tokens=%0d contours=%0d output stalls=%0d cycles=%0d", tokens, eops, stalls, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
