// Self-checking testbench for region_pixel.
// Streams random pixel triples (with gaps) under several random threshold
// sets, plus hand-picked corner cases, and compares Image 1' and Image 3'
// against a reference of actors A-E computed here. Each result must appear
// exactly four cycles after its input (latency 4, one pixel per cycle).
module tb_region_pixel;
  import hpdf_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  region_thr_t thr;
  logic        in_valid;
  logic [7:0]  in_y, in_bg, in_c;
  logic        out_valid;
  logic [7:0]  out_y, out_c;

  int checks = 0, failures = 0;
  int cycle = 0;

  region_pixel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int         t;
    logic [7:0] y, c;
    int a; logic [7:0] ty; region_thr_t tt;
  } exp_t;
  exp_t expq[$];

  function automatic exp_t ref_model(logic [7:0] y, logic [7:0] bg, logic [7:0] c,
                                     region_thr_t t, int when);
    int a;
    bit b, cc, d, e;
    exp_t r;
    a  = (int'(y) > int'(bg)) ? int'(y) - int'(bg) : int'(bg) - int'(y);
    b  = int'(c) > int'(t.t1);
    cc = (a > int'(t.t2)) && (int'(t.t3) > int'(y)) && (int'(y) > int'(t.t4));
    d  = a > int'(t.t5);
    e  = !(cc && d) || !(cc && b);
    r.t = when + 4;
    r.a = a; r.ty = y; r.tt = t;
    r.y = (cc && d) ? 8'hFF : 8'h00;
    r.c = e ? 8'hFF : 8'h00;
    return r;
  endfunction

  // in_valid delayed by four edges: where a result must appear
  logic [3:0] vpipe = '0;
  always @(posedge clk) begin
    vpipe <= {vpipe[2:0], in_valid};
    if (rst_n && (out_valid != vpipe[3])) begin
      checks++;
      failures++;
      $display("FAIL: out_valid=%0b at cycle %0d, expected %0b (latency 4)", out_valid, cycle, vpipe[3]);
    end
  end

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (e.y != out_y || e.c != out_c) begin
          failures++;
          $display("FAIL cycle %0d: y'=%h exp %h  c'=%h exp %h",
                   cycle, out_y, e.y, out_c, e.c);
          $display("   a=%0d y=%0d thr=%p dut thr=%p", e.a, e.ty, e.tt, thr);
        end
      end
    end
  end

  // inputs change on the falling edge, away from the sampling edge
  task automatic drive(logic [7:0] y, logic [7:0] bg, logic [7:0] c);
    @(negedge clk);
    in_valid = 1'b1; in_y = y; in_bg = bg; in_c = c;
    expq.push_back(ref_model(y, bg, c, thr, cycle));
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_y = '0; in_bg = '0; in_c = '0;
    thr = '{t1: 8'd140, t2: 8'd30, t3: 8'd220, t4: 8'd40, t5: 8'd20};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // corner cases: background, skin-like foreground, bright foreground
    drive(8'd100, 8'd100, 8'd100);   // A=0
    drive(8'd150, 8'd60,  8'd200);   // C, D, B all true -> E false
    drive(8'd150, 8'd60,  8'd100);   // C, D true, B false
    drive(8'd230, 8'd60,  8'd200);   // Y above thold3 -> C false
    drive(8'd41,  8'd10,  8'd141);   // just inside the bounds
    drive(8'd40,  8'd10,  8'd140);   // on the bounds (strict compares)
    idle(6);
    for (int set = 0; set < 6; set++) begin
      thr = '{t1: 8'($urandom), t2: 8'($urandom_range(0, 80)), t3: 8'($urandom_range(128, 255)),
              t4: 8'($urandom_range(0, 127)), t5: 8'($urandom_range(0, 80))};
      for (int i = 0; i < 400; i++) begin
        if ($urandom_range(0, 3) == 0) idle(1);
        drive(8'($urandom), 8'($urandom), 8'($urandom));
      end
      idle(6);   // drain before thresholds change
    end
    idle(6);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", expq.size());
    end
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
