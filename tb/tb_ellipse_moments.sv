// Self-checking testbench for ellipse_moments.
// Sends contour packets of random length (1 to 300 points, plus an empty
// packet that must give no result) with random gaps, holds out_ready low at
// random, and checks n, the averages and the three moments against a
// reference computed here with 64-bit integers by the same fixed-point
// formulas: avg = (S << FRAC) / n, m = (Sqq << FRAC)/n - ((avg_a*avg_b) >> FRAC).
// Also checks the stated latency from the end-of-packet token to out_valid.
module tb_ellipse_moments;
  import hpdf_pkg::*;

  localparam int unsigned FRAC = 8;
  localparam int unsigned XW = $clog2(IMG_W), YW = $clog2(IMG_H);
  localparam int unsigned NW = $clog2(IMG_W * IMG_H + 1);
  localparam int unsigned CW = (XW > YW) ? XW : YW;
  localparam int unsigned MW = 2 * CW + FRAC + 1;
  localparam int unsigned DIVW = 2 * CW + NW + FRAC;
  localparam int unsigned LAT = 5 * (DIVW + 1) + 2;

  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, in_eop;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;
  logic out_valid, out_ready;
  logic [NW-1:0] out_n;
  logic [XW+FRAC-1:0] out_xavg;
  logic [YW+FRAC-1:0] out_yavg;
  logic signed [MW-1:0] out_mxx, out_myy, out_mxy;

  int checks = 0, failures = 0, cycle = 0, eop_cycle = -1, results = 0;

  ellipse_moments #(.FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    longint n, xa, ya, mxx, myy, mxy;
  } exp_t;
  exp_t expq[$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  bit first_valid_seen = 1'b0;
  always @(posedge clk) begin
    if (rst_n && out_valid && !first_valid_seen) begin
      first_valid_seen = 1'b1;
      check("latency", cycle - eop_cycle, LAT);
    end
    if (rst_n && out_valid && out_ready) begin
      exp_t e;
      first_valid_seen = 1'b0;
      results++;
      if (expq.size() == 0) begin
        checks++; failures++;
        $display("FAIL: unexpected result");
      end else begin
        e = expq.pop_front();
        check("n", longint'(out_n), e.n);
        check("xavg", longint'(out_xavg), e.xa);
        check("yavg", longint'(out_yavg), e.ya);
        check("mxx", longint'(out_mxx), e.mxx);
        check("myy", longint'(out_myy), e.myy);
        check("mxy", longint'(out_mxy), e.mxy);
      end
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  // send one token, waiting for in_ready
  task automatic send(int x, int y, bit eop);
    @(negedge clk);
    in_valid = 1'b1; in_x = XW'(x); in_y = YW'(y); in_eop = eop;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    if (eop) eop_cycle = cycle;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic packet(int len, int cx, int cy, int r);
    longint n = 0, sx = 0, sy = 0, sxx = 0, syy = 0, sxy = 0;
    exp_t e;
    for (int i = 0; i < len; i++) begin
      int x, y;
      x = cx + $urandom_range(0, 2 * r) - r;
      y = cy + $urandom_range(0, r) - r / 2;
      if (x < 0) x = 0;
      if (x > IMG_W - 1) x = IMG_W - 1;
      if (y < 0) y = 0;
      if (y > IMG_H - 1) y = IMG_H - 1;
      n++; sx += x; sy += y; sxx += x * x; syy += y * y; sxy += x * y;
      send(x, y, 1'b0);
    end
    if (n > 0) begin
      e.n   = n;
      e.xa  = (sx << FRAC) / n;
      e.ya  = (sy << FRAC) / n;
      e.mxx = ((sxx << FRAC) / n) - ((e.xa * e.xa) >> FRAC);
      e.myy = ((syy << FRAC) / n) - ((e.ya * e.ya) >> FRAC);
      e.mxy = ((sxy << FRAC) / n) - ((e.xa * e.ya) >> FRAC);
      expq.push_back(e);
    end
    send(0, 0, 1'b1);
  endtask

  initial begin
    int sent = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0; in_y = '0; in_eop = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    packet(1, 383, 239, 0);          // single point at the far corner
    packet(0, 0, 0, 0);              // empty packet: no result
    packet(4, 10, 10, 1);
    sent = 2;
    for (int p = 0; p < 25; p++) begin
      packet($urandom_range(1, 300), $urandom_range(0, IMG_W - 1),
             $urandom_range(0, IMG_H - 1), $urandom_range(1, 120));
      sent++;
    end
    repeat (400) @(posedge clk);
    check("results", results, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
