// Self-checking testbench for ellipse_axes at the full-size widths.
// Feeds moment sets made from known ellipses (semi-axes a, b, angle theta, so
// that mxx = (a^2 cos^2 + b^2 sin^2)/2 and so on), random valid moment
// matrices, and corner cases: a circle (no defined angle), a degenerate
// line, all four quadrants of (mxx - myy, 2 mxy), zero. The reference is
// computed here with real arithmetic ($atan2, $sqrt) and compared within
// tolerances that allow for the 16-step CORDIC and truncating square roots.
// The orientation is compared modulo pi and skipped when the moment matrix is
// too close to a circle to define it. The pass-through fields, the latency
// and the out_ready hold are checked too.
module tb_ellipse_axes;
  import hpdf_pkg::*;

  localparam int unsigned FRAC = 8;
  localparam int unsigned XW = $clog2(IMG_W), YW = $clog2(IMG_H);
  localparam int unsigned NW = $clog2(IMG_W * IMG_H + 1);
  localparam int unsigned MW = 2 * ((XW > YW) ? XW : YW) + FRAC + 1;
  localparam int unsigned SW = ((MW + 2 + FRAC) + 1) / 2 * 2;
  localparam int unsigned RW = SW / 2;
  localparam int unsigned LAT = 16 + RW + 3;   // counted from the cycle the input is taken
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [NW-1:0] in_n, out_n;
  logic [XW+FRAC-1:0] in_xavg, out_xavg;
  logic [YW+FRAC-1:0] in_yavg, out_yavg;
  logic signed [MW-1:0] in_mxx, in_myy, in_mxy, out_mxx, out_myy, out_mxy;
  logic signed [17:0] out_rot;
  logic [RW-1:0] out_ax, out_ay;

  int checks = 0, failures = 0, cycle = 0, results = 0, holds = 0, skipped_angles = 0;

  ellipse_axes dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check_tol(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f (tol %f)", what, got, exp, tol);
    end
  endtask

  // send one moment set and check the result
  task automatic run(longint mxx, longint myy, longint mxy);
    real p, q, r, tr, rot_ref, ax_ref, ay_ref, d, tol_ay;
    int t0, n;
    n = $urandom_range(1, 5000);
    @(negedge clk);
    in_valid = 1'b1; in_n = NW'(n); in_xavg = (XW + FRAC)'($urandom); in_yavg = (YW + FRAC)'($urandom);
    in_mxx = MW'(mxx); in_myy = MW'(myy); in_mxy = MW'(mxy);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycle - t0 != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycle - t0, LAT);
    end
    // hold the result for a few cycles at random
    out_ready = 1'b0;
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      holds++;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL result dropped while held"); end
    end
    p = real'(mxx - myy);
    q = 2.0 * real'(mxy);
    r = $sqrt(p * p + q * q);
    tr = real'(mxx + myy);
    rot_ref = 0.5 * $atan2(q, p) * 65536.0;
    ax_ref = (tr + r > 0) ? $sqrt((tr + r) * 256.0) : 0.0;
    ay_ref = (tr - r > 0) ? $sqrt((tr - r) * 256.0) : 0.0;
    if (r >= 64.0) begin
      d = real'(out_rot) - rot_ref;
      if (d > PI * 32768.0) d -= PI * 65536.0;
      if (d < -PI * 32768.0) d += PI * 65536.0;
      check_tol("rot", d, 0.0, 24.0);
    end else skipped_angles++;
    check_tol("ax", real'(out_ax), ax_ref, 2.0 + 128.0 * (r * 1.0e-4 + 2.0) / ((ax_ref > 1.0) ? ax_ref : 1.0));
    tol_ay = 2.0 + 128.0 * (r * 1.0e-4 + 2.0) / ((ay_ref > 16.0) ? ay_ref : 16.0);
    check_tol("ay", real'(out_ay), ay_ref, tol_ay);
    checks++;
    if (out_n != NW'(n) || out_xavg != in_xavg || out_yavg != in_yavg ||
        out_mxx != MW'(mxx) || out_myy != MW'(myy) || out_mxy != MW'(mxy)) begin
      failures++;
      $display("FAIL pass-through fields");
    end
    out_ready = 1'b1;
    @(negedge clk);
    results++;
    out_ready = 1'b0;
  endtask

  // moments (Q.8) of an ellipse outline with semi-axes a, b at angle th
  task automatic from_ellipse(real a, real b, real th);
    real c, s;
    c = $cos(th); s = $sin(th);
    run(longint'((a * a * c * c + b * b * s * s) / 2.0 * 256.0),
        longint'((a * a * s * s + b * b * c * c) / 2.0 * 256.0),
        longint'((a * a - b * b) * c * s / 2.0 * 256.0));
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0;
    in_n = '0; in_xavg = '0; in_yavg = '0; in_mxx = '0; in_myy = '0; in_mxy = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 0);                         // single pixel
    run(2560, 2560, 0);                   // circle: no angle
    run(25600, 0, 0);                     // horizontal line
    run(0, 25600, 0);                     // vertical line: angle pi/2
    run(12800, 12800, 12800);             // diagonal line, +45 degrees
    run(12800, 12800, -12800);            // -45 degrees
    run(1000, 9000, 2000);                // left half plane, mxy > 0
    run(1000, 9000, -2000);               // left half plane, mxy < 0
    run(36864 * 256, 14400 * 256, 0);     // largest image-sized spread
    for (int i = 0; i < 60; i++)
      from_ellipse(1.0 + $urandom_range(0, 1900) / 10.0, 0.5 + $urandom_range(0, 1000) / 10.0,
                   ($urandom_range(0, 62831) / 10000.0) - PI);
    for (int i = 0; i < 60; i++) begin
      longint a, b, c;
      a = $urandom_range(0, 4000000);
      b = $urandom_range(0, 4000000);
      c = longint'($sqrt(real'(a) * real'(b)) * ($urandom_range(0, 2000) / 1000.0 - 1.0));
      run(a, b, c);
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL: out_ready hold never exercised"); end
    $display("results=%0d holds=%0d angles skipped (near circle)=%0d", results, holds, skipped_angles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
