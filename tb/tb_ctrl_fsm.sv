// Self-checking testbench for ctrl_fsm on a 16 x 4 image.
// Five in-order memory banks with a three-cycle read latency are modelled
// here. The Region lanes are replaced by a stand-in with the same four-cycle
// latency whose results are easy to predict (Image 1' = Y xor Cr/Cb,
// Image 3' = Y + background), and the Contour block by a stand-in that
// writes a known byte into word 0 of the bank it is given and then pulses
// done, so the routing of each phase can be checked.
// Checks: the three input images land in banks 0-2 four pixels to a word;
// banks 3 and 4 hold the lane results at the right addresses; the Region pass
// issues one word per cycle (NWORDS consecutive read cycles); each Contour
// phase reaches the right bank; the unloaded byte stream equals banks 3 and 4
// in order, with tx_ready stalls; the phases follow the stated order and done
// pulses once.
module tb_ctrl_fsm;
  import hpdf_pkg::*;

  localparam int unsigned W = 16, H = 4;
  localparam int unsigned NPIX = W * H, NWORDS = NPIX / 4;
  localparam int unsigned RLAT = 3;

  logic clk = 1'b0, rst_n, start;
  phase_e phase;
  logic done;
  logic rx_valid; logic [7:0] rx_data;
  logic tx_valid, tx_ready; logic [7:0] tx_data;
  mem_req_t bank_req [NUM_BANKS];
  logic bank_ready [NUM_BANKS];
  mem_rsp_t bank_rsp [NUM_BANKS];
  logic lane_in_valid;
  logic [7:0] lane_in_y [PIX_PER_WORD], lane_in_bg [PIX_PER_WORD], lane_in_c [PIX_PER_WORD];
  logic lane_out_valid;
  logic [7:0] lane_out_y [PIX_PER_WORD], lane_out_c [PIX_PER_WORD];
  logic ct_start; logic [ZBT_ADDR_W-1:0] ct_base; logic ct_done;
  mem_req_t ct_req; logic ct_ready; mem_rsp_t ct_rsp;

  int checks = 0, failures = 0, cycle = 0;

  ctrl_fsm #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---- five memory banks ----
  logic [31:0] mem [NUM_BANKS][NWORDS];
  logic        pv [NUM_BANKS][RLAT];
  logic [31:0] pd [NUM_BANKS][RLAT];
  always_comb for (int b = 0; b < NUM_BANKS; b++) bank_ready[b] = 1'b1;
  always @(posedge clk) begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int i = RLAT - 1; i > 0; i--) begin pv[b][i] <= pv[b][i-1]; pd[b][i] <= pd[b][i-1]; end
      pv[b][0] <= 1'b0;
      if (bank_req[b].valid) begin
        if (bank_req[b].addr >= NWORDS) begin
          checks++; failures++;
          $display("FAIL: bank %0d address %0d out of range", b, bank_req[b].addr);
        end else if (bank_req[b].we) begin
          for (int k = 0; k < 4; k++)
            if (bank_req[b].be[k]) mem[b][bank_req[b].addr][8*k +: 8] <= bank_req[b].wdata[8*k +: 8];
        end else begin
          pv[b][0] <= 1'b1;
          pd[b][0] <= mem[b][bank_req[b].addr];
        end
      end
    end
  end
  always_comb for (int b = 0; b < NUM_BANKS; b++) begin
    bank_rsp[b].valid = pv[b][RLAT-1];
    bank_rsp[b].rdata = pd[b][RLAT-1];
  end

  // ---- Region lane stand-in: four-cycle latency ----
  logic       lv [4];
  logic [7:0] ly [4][PIX_PER_WORD], lc [4][PIX_PER_WORD];
  always @(posedge clk) begin
    lv[0] <= lane_in_valid;
    for (int i = 0; i < PIX_PER_WORD; i++) begin
      ly[0][i] <= lane_in_y[i] ^ lane_in_c[i];
      lc[0][i] <= lane_in_y[i] + lane_in_bg[i];
    end
    for (int s = 1; s < 4; s++) begin lv[s] <= lv[s-1]; ly[s] <= ly[s-1]; lc[s] <= lc[s-1]; end
  end
  assign lane_out_valid = lv[3];
  assign lane_out_y = ly[3];
  assign lane_out_c = lc[3];

  // ---- Contour stand-in: one byte write to word 0, then done ----
  int ct_runs = 0;
  logic ct_busy = 1'b0, ct_wrote = 1'b0;
  always_comb begin
    ct_req = '0;
    if (ct_busy && !ct_wrote) begin
      ct_req.valid = 1'b1; ct_req.we = 1'b1; ct_req.addr = ct_base;
      ct_req.be = 4'b0010; ct_req.wdata = {4{8'hC0 + 8'(ct_runs)}};
    end
  end
  always @(posedge clk) begin
    ct_done <= 1'b0;
    if (ct_start) begin ct_busy <= 1'b1; ct_wrote <= 1'b0; end
    else if (ct_busy && !ct_wrote && ct_ready) ct_wrote <= 1'b1;
    else if (ct_busy && ct_wrote) begin ct_busy <= 1'b0; ct_done <= 1'b1; ct_runs <= ct_runs + 1; end
  end

  // ---- phase monitor ----
  phase_e last_phase = PH_IDLE;
  phase_e seq[$];
  int region_reads = 0, region_start = -1, region_end = -1, dones = 0, tx_stalls = 0;
  always @(posedge clk) if (rst_n) begin
    if (phase != last_phase) seq.push_back(phase);
    last_phase <= phase;
    if (phase == PH_REGION && bank_req[BANK_Y].valid) begin
      region_reads++;
      if (region_start < 0) region_start = cycle;
      region_end = cycle;
    end
    if (done) dones++;
    if (tx_valid && !tx_ready) tx_stalls++;
  end

  // ---- stimulus ----
  logic [7:0] src [3][NPIX];
  logic [7:0] rx_bytes[$];
  initial begin
    rst_n = 1'b0; start = 1'b0; rx_valid = 1'b0; rx_data = '0; tx_ready = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int i = 0; i < NWORDS; i++) mem[b][i] = '0;
      for (int i = 0; i < RLAT; i++) begin pv[b][i] = 1'b0; pd[b][i] = '0; end
    end
    for (int s = 0; s < 4; s++) lv[s] = 1'b0;
    for (int m = 0; m < 3; m++) for (int i = 0; i < NPIX; i++) src[m][i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    // host sends three images, with gaps
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        rx_valid = 1'b1; rx_data = src[m][i];
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); rx_valid = 1'b0; end
      end
    @(negedge clk); rx_valid = 1'b0;
    // receive the unloaded images
    while (phase != PH_UNLOAD) @(negedge clk);
    // input images must be in banks 0-2
    for (int m = 0; m < 3; m++)
      for (int i = 0; i < NPIX; i++)
        check($sformatf("bank %0d pixel %0d", m, i), mem[m][i/4][8*(i%4) +: 8], src[m][i]);
    // region results, with the contour stand-in's byte in word 0
    for (int i = 0; i < NPIX; i++) begin
      logic [7:0] ey, ec;
      ey = src[0][i] ^ src[2][i];
      ec = src[0][i] + src[1][i];
      if (i == 1) begin ey = 8'hC0; ec = 8'hC1; end
      check($sformatf("bank 3 pixel %0d", i), mem[3][i/4][8*(i%4) +: 8], ey);
      check($sformatf("bank 4 pixel %0d", i), mem[4][i/4][8*(i%4) +: 8], ec);
    end
    for (int i = 0; i < 2 * NPIX; i++) begin
      @(negedge clk);
      tx_ready = ($urandom_range(0, 2) != 0);
      while (!(tx_valid && tx_ready)) begin
        @(negedge clk);
        tx_ready = ($urandom_range(0, 2) != 0);
      end
      // the byte is taken at the next rising edge
      check($sformatf("tx byte %0d", i), tx_data, mem[3 + i / NPIX][(i % NPIX) / 4][8*(i % 4) +: 8]);
    end
    @(negedge clk); tx_ready = 1'b0;
    repeat (5) @(posedge clk);
    check("done pulses", dones, 1);
    check("region reads", region_reads, NWORDS);
    check("region read cycles back to back", region_end - region_start + 1, NWORDS);
    check("contour runs", ct_runs, 2);
    check("phase count", seq.size(), 7);
    if (seq.size() == 7) begin
      check("phase 0", seq[0], PH_LOAD);
      check("phase 1", seq[1], PH_REGION);
      check("phase 2", seq[2], PH_CONTOUR_Y);
      check("phase 3", seq[3], PH_CONTOUR_C);
      check("phase 4", seq[4], PH_UNLOAD);
      check("phase 5", seq[5], PH_DONE);
      check("phase 6", seq[6], PH_IDLE);
    end
    checks++;
    if (tx_stalls == 0) begin failures++; $display("FAIL: tx back-pressure never exercised"); end
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
