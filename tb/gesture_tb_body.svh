// Shared body of the end-to-end testbenches of gesture_fpga_top.
// The including module defines W and H, then instantiates the top as `dut`
// with .* after this file. The test:
//   * builds an image group from simple shapes (a disc of skin chroma, a
//     block, a ring with a hole, a single pixel, a bar against the left
//     edge) on a textured background, and sends it over the rx byte link;
//   * works out independently the two marked images (actors A-E), the
//     contours of both (scan-and-trace model), the marked final images and
//     the moments of every contour;
//   * checks every ellipse result (count, centre and moments exactly;
//     orientation and semi-axes against real arithmetic within tolerance),
//     every unloaded byte, the Region pass length and done; and counts the mechanisms the design has, failing
//     any that never happened.
// The external ZBT banks are behavioural models.

  localparam int unsigned NPIX = W * H, NWORDS = NPIX / 4;
  localparam int unsigned XW = $clog2(W), YW = $clog2(H);
  localparam int unsigned FRAC = 8;
  localparam int unsigned NW = $clog2(W * H + 1);
  localparam int unsigned MW = 2 * ((XW > YW) ? XW : YW) + FRAC + 1;

  logic clk = 1'b0, rst_n, start, done;
  region_thr_t thr;
  phase_e phase;
  logic rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  zbt_pins_t zbt_pins [NUM_BANKS];
  logic [ZBT_DATA_W-1:0] zbt_dq_i [NUM_BANKS];
  logic [ZBT_DATA_W-1:0] sram_dq [NUM_BANKS];
  logic ell_valid, ell_ready;
  logic [NW-1:0] ell_n;
  logic [XW+FRAC-1:0] ell_xavg;
  logic [YW+FRAC-1:0] ell_yavg;
  logic signed [MW-1:0] ell_mxx, ell_myy, ell_mxy;
  localparam int unsigned RW = ((MW + 2 + FRAC) + 1) / 2;
  int mom_stalls = 0, tok_stalls = 0;
  logic signed [17:0] ell_rot;
  logic [RW-1:0] ell_ax, ell_ay;

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_sram
    zbt_sram_model #(.ADDR_W(ZBT_ADDR_W), .DATA_W(ZBT_DATA_W), .DEPTH(NWORDS)) u_sram (
      .clk, .addr(zbt_pins[b].addr), .cs_n(zbt_pins[b].cs_n), .we_n(zbt_pins[b].we_n),
      .cke_n(zbt_pins[b].cke_n), .bw_n(zbt_pins[b].bw_n), .dq_i(zbt_pins[b].dq_o),
      .dq_o(sram_dq[b]));
    assign zbt_dq_i[b] = zbt_pins[b].dq_oe ? zbt_pins[b].dq_o : sram_dq[b];
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- picture ----------------
  logic [7:0] src [3][NPIX];          // Y, background, Cr/Cb
  logic [7:0] img [2][NPIX];          // model of Image 1' and Image 3'

  function automatic bit in_disc(int x, int y, int cx, int cy, int r);
    return (x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r;
  endfunction

  function automatic void make_picture();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int i = y * W + x;
        bit fg, skin;
        skin = in_disc(x, y, W / 4, H / 3, H / 6);
        fg = skin
          || (x >= W / 2 && x < W / 2 + W / 8 && y >= H / 4 && y < H / 2)
          || (in_disc(x, y, 3 * W / 4, 2 * H / 3, H / 5) && !in_disc(x, y, 3 * W / 4, 2 * H / 3, H / 10))
          || (x == 7 * W / 8 && y == H / 8)
          || (y >= H - 3 && y < H - 1 && x < W / 6);
        src[1][i] = 8'(80 + (x * 7 + y * 13) % 40);
        src[0][i] = fg ? src[1][i] + 8'd60 : src[1][i] + 8'($urandom_range(0, 5));
        src[2][i] = skin ? 8'd200 : 8'd100;
      end
  endfunction

  function automatic void region_model();
    for (int i = 0; i < NPIX; i++) begin
      int a;
      bit b, c, d;
      a = (src[0][i] > src[1][i]) ? int'(src[0][i]) - int'(src[1][i]) : int'(src[1][i]) - int'(src[0][i]);
      b = src[2][i] > thr.t1;
      c = (a > int'(thr.t2)) && (thr.t3 > src[0][i]) && (src[0][i] > thr.t4);
      d = a > int'(thr.t5);
      img[0][i] = (c && d) ? PIX_REGION : PIX_BG;
      img[1][i] = (!(c && d) || !(c && b)) ? PIX_REGION : PIX_BG;
    end
  endfunction

  // ---------------- contour and ellipse model ----------------
  typedef struct { longint n, xa, ya, mxx, myy, mxy; } ell_t;
  ell_t ellq[$];
  int   exp_contours [2];
  int   single_pixel_contours = 0;
  longint sn, sx, sy, sxx, syy, sxy;

  function automatic void emit(int m, int x, int y);
    img[m][y * W + x] = PIX_CONTOUR;
    sn++; sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
  endfunction

  function automatic bit nonbg(int m, int x, int y);
    return x >= 0 && x < W && y >= 0 && y < H && img[m][y * W + x] != PIX_BG;
  endfunction

  function automatic void trace(int m, int x0, int y0);
    int dxs[8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    int dys[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    int cx = x0, cy = y0, s = 4, p1x = -1, p1y = -1, steps = 0;
    bit first = 1'b1;
    ell_t e;
    sn = 0; sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0;
    emit(m, x0, y0);
    forever begin
      int nx = 0, ny = 0, d = 0;
      bit hit = 1'b0;
      for (int k = 1; k <= 7 && !hit; k++) begin
        d = (s + k) % 8;
        nx = cx + dxs[d];
        ny = cy + dys[d];
        hit = nonbg(m, nx, ny);
      end
      if (!hit) break;
      if (!first && cx == x0 && cy == y0 && nx == p1x && ny == p1y) break;
      if (steps == 4 * NPIX) break;
      if (first) begin p1x = nx; p1y = ny; first = 1'b0; end
      steps++;
      cx = nx; cy = ny;
      s = (d % 2 == 1) ? (d + 5) % 8 : (d + 6) % 8;
      if (img[m][cy * W + cx] == PIX_REGION) emit(m, cx, cy);
    end
    if (sn == 1) single_pixel_contours++;
    e.n   = sn;
    e.xa  = (sx << FRAC) / sn;
    e.ya  = (sy << FRAC) / sn;
    e.mxx = ((sxx << FRAC) / sn) - ((e.xa * e.xa) >> FRAC);
    e.myy = ((syy << FRAC) / sn) - ((e.ya * e.ya) >> FRAC);
    e.mxy = ((sxy << FRAC) / sn) - ((e.xa * e.ya) >> FRAC);
    ellq.push_back(e);
  endfunction

  function automatic void contour_model(int m);
    exp_contours[m] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (img[m][y * W + x] == PIX_REGION && (x == 0 || img[m][y * W + x - 1] == PIX_BG)) begin
          trace(m, x, y);
          exp_contours[m]++;
        end
  endfunction

  // ---------------- monitors: results and mechanisms ----------------
  int ell_results = 0, ell_stalls = 0, tx_stalls = 0, rx_gaps = 0;
  int region_words = 0, border_looks = 0, scan_flushes = 0, revisits = 0;
  int eops [2] = '{0, 0};
  int load_cycles = 0, region_cycles = 0, contour_cycles = 0, unload_cycles = 0;

  // While Image 1' is traced, no result is taken until the back-pressure has
  // run all the way back (axes full -> moments held -> Contour stalled);
  // otherwise ready is random, with long low stretches.
  always @(negedge clk)
    ell_ready = ((tok_stalls > 0 && mom_stalls > 0) || phase != PH_CONTOUR_Y) &&
                ((cycle / 300) % 2 == 0) && ($urandom_range(0, 1) != 0);

  always @(posedge clk) if (rst_n) begin
    if (ell_valid && !ell_ready) ell_stalls++;
    if (dut.tok_valid && !dut.tok_ready) tok_stalls++;
    if (dut.mom_valid && !dut.mom_ready) mom_stalls++;
    if (dut.tok_valid && dut.tok_ready && dut.tok_eop)
      eops[(phase == PH_CONTOUR_C) ? 1 : 0]++;
    if (tx_valid && !tx_ready) tx_stalls++;
    if (phase == PH_LOAD && !rx_valid) rx_gaps++;
    if (dut.lane_out_valid_v[0]) region_words++;
    if (dut.u_contour.state == 3'd4 && !dut.u_contour.n_inside) border_looks++;
    if (dut.u_contour.state == 3'd2 && dut.u_contour.outstanding != 0) scan_flushes++;
    if (dut.u_contour.state == 3'd5 && dut.ct_rsp.valid && dut.u_contour.nval == PIX_CONTOUR) revisits++;
    case (phase)
      PH_LOAD: load_cycles++;
      PH_REGION: region_cycles++;
      PH_CONTOUR_Y, PH_CONTOUR_C: contour_cycles++;
      PH_UNLOAD: unload_cycles++;
      default: ;
    endcase
    if (ell_valid && ell_ready) begin
      ell_t e;
      ell_results++;
      if (ellq.size() == 0) begin
        checks++; failures++;
        $display("FAIL: unexpected ellipse result");
      end else begin
        e = ellq.pop_front();
        check("ellipse n", longint'(ell_n), e.n);
        check("ellipse xavg", longint'(ell_xavg), e.xa);
        check("ellipse yavg", longint'(ell_yavg), e.ya);
        check("ellipse mxx", longint'(ell_mxx), e.mxx);
        check("ellipse myy", longint'(ell_myy), e.myy);
        check("ellipse mxy", longint'(ell_mxy), e.mxy);
        check_shape(e);
      end
    end
  end

  // orientation and semi-axes against a real-arithmetic reference, within
  // the CORDIC and square-root tolerances; the angle only where defined
  int angles_checked = 0;
  task automatic check_shape(ell_t e);
    real p, q, r, tr, d, ax_ref, ay_ref;
    p = real'(e.mxx - e.myy);
    q = 2.0 * real'(e.mxy);
    r = $sqrt(p * p + q * q);
    tr = real'(e.mxx + e.myy);
    ax_ref = (tr + r > 0) ? $sqrt((tr + r) * 256.0) : 0.0;
    ay_ref = (tr - r > 0) ? $sqrt((tr - r) * 256.0) : 0.0;
    if (r >= 64.0) begin
      d = real'(ell_rot) - 0.5 * $atan2(q, p) * 65536.0;
      if (d > 3.14159265 * 32768.0) d -= 3.14159265 * 65536.0;
      if (d < -3.14159265 * 32768.0) d += 3.14159265 * 65536.0;
      check("ellipse rot within tolerance", (d > 24.0 || d < -24.0) ? longint'(d) : 0, 0);
      angles_checked++;
    end
    d = real'(ell_ax) - ax_ref;
    check("ellipse ax within tolerance", (d > 4.0 || d < -4.0) ? longint'(d) : 0, 0);
    d = real'(ell_ay) - ay_ref;
    check("ellipse ay within tolerance",
          (d > 4.0 + 128.0 * (r * 1.0e-4 + 2.0) / ((ay_ref > 16.0) ? ay_ref : 16.0) ||
           d < -4.0 - 128.0 * (r * 1.0e-4 + 2.0) / ((ay_ref > 16.0) ? ay_ref : 16.0)) ? longint'(d) : 0, 0);
  endtask

  task automatic mechanism(string what, int count);
    $display("  %-34s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int total_contours, expected_results;
    rst_n = 1'b0; start = 1'b0; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b0;
    thr = '{t1: 8'd150, t2: 8'd30, t3: 8'd220, t4: 8'd40, t5: 8'd25};
    make_picture();
    region_model();
    contour_model(0);
    contour_model(1);
    expected_results = ellq.size();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        rx_valid = 1'b1; rx_data = src[m][i];
        if ((i % 97) == 5) begin @(negedge clk); rx_valid = 1'b0; end
      end
    @(negedge clk); rx_valid = 1'b0;
    // take the unloaded images: Image 1' then Image 3', marked with contours
    while (phase != PH_UNLOAD) @(negedge clk);
    for (int i = 0; i < 2 * NPIX; i++) begin
      @(negedge clk);
      tx_ready = ((i % 5) != 3);
      while (!(tx_valid && tx_ready)) begin
        @(negedge clk);
        tx_ready = 1'b1;
      end
      check($sformatf("image %0d pixel %0d", i / NPIX, i % NPIX), tx_data, img[i / NPIX][i % NPIX]);
    end
    @(negedge clk); tx_ready = 1'b0;
    while (phase != PH_IDLE) @(negedge clk);
    repeat (5) @(posedge clk);
    total_contours = exp_contours[0] + exp_contours[1];
    check("contours in Image 1'", eops[0], exp_contours[0]);
    check("contours in Image 3'", eops[1], exp_contours[1]);
    check("ellipse results", ell_results, expected_results);
    check("Region words written", region_words, NWORDS);
    // Region pass: one word per cycle plus read latency and pipeline fill
    check("Region pass cycles", region_cycles, NWORDS + 3 + 4 + 1);
    $display("image %0dx%0d: %0d + %0d contours, cycles load=%0d region=%0d contour=%0d unload=%0d",
             W, H, exp_contours[0], exp_contours[1], load_cycles, region_cycles,
             contour_cycles, unload_cycles);
    mechanism("Region word pass (4 lanes)", region_words);
    mechanism("contour traced in Image 1'", eops[0]);
    mechanism("contour traced in Image 3'", eops[1]);
    mechanism("single-pixel contour", single_pixel_contours);
    mechanism("neighbour outside the image", border_looks);
    mechanism("scan reads dropped at a start", scan_flushes);
    mechanism("traced pixel met again", revisits);
    mechanism("Contour stalled by Ellipse", tok_stalls);
    mechanism("ellipse orientation computed", angles_checked);
    mechanism("moments held by busy axis unit", mom_stalls);
    mechanism("ellipse result held (ready low)", ell_stalls);
    mechanism("host rx gap", rx_gaps);
    mechanism("host tx back-pressure", tx_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * NPIX + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
