// Self-checking testbench for zbt_ctrl, driving a behavioural ZBT SRAM model.
// Issues a random mix of reads and byte-masked writes, back to back with no
// idle cycles between a write and a read (the point of ZBT memory), and checks
// every read against a shadow copy of the memory. Each response must arrive
// exactly three cycles after its request, in order.
module tb_zbt_ctrl;
  import hpdf_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned LAT   = 4;  // from the drive cycle; 3 edges after acceptance

  logic                  clk = 1'b0;
  logic                  rst_n;
  mem_req_t              req;
  logic                  req_ready;
  mem_rsp_t              rsp;
  zbt_pins_t             pins;
  logic [ZBT_DATA_W-1:0] dq_i, sram_dq;

  int checks = 0, failures = 0;
  int cycle = 0;

  zbt_ctrl dut (.clk, .rst_n, .req, .req_ready, .rsp, .pins, .dq_i);

  zbt_sram_model #(.ADDR_W(ZBT_ADDR_W), .DATA_W(ZBT_DATA_W), .DEPTH(DEPTH)) u_sram (
    .clk, .addr(pins.addr), .cs_n(pins.cs_n), .we_n(pins.we_n), .cke_n(pins.cke_n),
    .bw_n(pins.bw_n), .dq_i(pins.dq_o), .dq_o(sram_dq)
  );
  // the FPGA sees its own data on the bus while it drives it
  assign dq_i = pins.dq_oe ? pins.dq_o : sram_dq;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [ZBT_DATA_W-1:0] shadow [DEPTH];
  typedef struct { int t; logic [ZBT_DATA_W-1:0] d; } exp_t;
  exp_t expq[$];

  always @(posedge clk) begin
    if (rst_n && rsp.valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected response at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (e.d != rsp.rdata || cycle != e.t + LAT) begin
          failures++;
          $display("FAIL cycle %0d: data %h exp %h (issued %0d)", cycle, rsp.rdata, e.d, e.t);
        end
      end
    end
  end

  task automatic issue(bit we, int unsigned a, logic [3:0] be, logic [31:0] d);
    @(negedge clk);
    req.valid = 1'b1; req.we = we; req.addr = ZBT_ADDR_W'(a); req.be = be; req.wdata = d;
    if (we) begin
      for (int b = 0; b < 4; b++) if (be[b]) shadow[a][8*b +: 8] = d[8*b +: 8];
    end else begin
      expq.push_back('{t: cycle, d: shadow[a]});
    end
  endtask

  task automatic idle();
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    rst_n = 1'b0; req = '0;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill, then read back every word
    for (int i = 0; i < 64; i++) issue(1'b1, i, 4'hF, $urandom);
    for (int i = 0; i < 64; i++) issue(1'b0, i, 4'hF, '0);
    // write immediately followed by a read of the same word
    issue(1'b1, 7, 4'b0101, 32'hA5A5_A5A5);
    issue(1'b0, 7, 4'hF, '0);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 7) == 0) idle();
      issue($urandom_range(0, 1) == 1, $urandom_range(0, DEPTH - 1), 4'($urandom), $urandom);
    end
    idle();
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d reads never answered", expq.size());
    end
    checks++;
    if (req_ready !== 1'b1) failures++;
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
