// Low-level vision front end of a smart-camera gesture recogniser, on one FPGA.
//
// The chain Region -> Contour -> Ellipse runs on image groups (luminance Y,
// background, downsampled Cr/Cb) held in five external ZBT SRAM banks:
//   * a control state machine loads the three input images from a host byte
//     link into banks 0-2 and sequences the passes;
//   * four Region lanes process the four pixels of each memory word in
//     parallel and write the two marked images to banks 3 and 4;
//   * Contour traces the regions of both marked images in turn, marks the
//     boundary pixels in place and streams their (x, y) positions, one packet
//     per contour closed by an end-of-packet token;
//   * Ellipse moments turns each packet into centre and second moments, and
//     Ellipse axes adds orientation and semi-axis lengths; the five ellipse
//     parameters (with count and moments) leave on the ell_* stream, to the
//     Match stage, which is not part of this design;
//   * after both images are traced they are sent back on the host tx link.
// The block split and the five-bank layout (one image per bank, four pixels
// per word) follow the design. The four-way Region parallelism, the host
// link as a byte stream, the direct Contour-to-Ellipse connection with
// back-pressure and the result formats are this design's choices.
//
// ZBT pins are brought out per bank as a packed struct plus the read-data
// input (the bidirectional data bus is split into dq_o, dq_oe and dq_i).
// Thresholds must be held stable during the Region pass.
module gesture_fpga_top
  import hpdf_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned FRAC = 8,
  parameter int unsigned XW   = $clog2(W),
  parameter int unsigned YW   = $clog2(H),
  parameter int unsigned NW   = $clog2(W * H + 1),
  parameter int unsigned MW   = 2 * ((XW > YW) ? XW : YW) + FRAC + 1,
  parameter int unsigned RW   = ((MW + 2 + FRAC) + 1) / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  region_thr_t           thr,
  output phase_e                phase,
  output logic                  done,
  // host link
  input  logic                  rx_valid,
  input  logic [7:0]            rx_data,
  output logic                  tx_valid,
  input  logic                  tx_ready,
  output logic [7:0]            tx_data,
  // ZBT SRAM banks
  output zbt_pins_t             zbt_pins [NUM_BANKS],
  input  logic [ZBT_DATA_W-1:0] zbt_dq_i [NUM_BANKS],
  // ellipse results
  output logic                  ell_valid,
  input  logic                  ell_ready,
  output logic [NW-1:0]         ell_n,
  output logic [XW+FRAC-1:0]    ell_xavg,
  output logic [YW+FRAC-1:0]    ell_yavg,
  output logic signed [MW-1:0]  ell_mxx,
  output logic signed [MW-1:0]  ell_myy,
  output logic signed [MW-1:0]  ell_mxy,
  output logic signed [17:0]    ell_rot,
  output logic [RW-1:0]         ell_ax,
  output logic [RW-1:0]         ell_ay
);

  mem_req_t  bank_req   [NUM_BANKS];
  logic      bank_ready [NUM_BANKS];
  mem_rsp_t  bank_rsp   [NUM_BANKS];

  logic       lane_in_valid;
  logic [7:0] lane_in_y  [PIX_PER_WORD];
  logic [7:0] lane_in_bg [PIX_PER_WORD];
  logic [7:0] lane_in_c  [PIX_PER_WORD];
  logic       lane_out_valid_v [PIX_PER_WORD];
  logic [7:0] lane_out_y [PIX_PER_WORD];
  logic [7:0] lane_out_c [PIX_PER_WORD];

  logic                  ct_start, ct_done, ct_busy, ct_ready;
  logic [ZBT_ADDR_W-1:0] ct_base;
  mem_req_t              ct_req;
  mem_rsp_t              ct_rsp;
  logic                  tok_valid, tok_ready, tok_eop;
  logic [XW-1:0]         tok_x;
  logic [YW-1:0]         tok_y;

  ctrl_fsm #(.W(W), .H(H)) u_ctrl (
    .clk, .rst_n, .start, .phase, .done,
    .rx_valid, .rx_data, .tx_valid, .tx_ready, .tx_data,
    .bank_req, .bank_ready, .bank_rsp,
    .lane_in_valid, .lane_in_y, .lane_in_bg, .lane_in_c,
    .lane_out_valid(lane_out_valid_v[0]), .lane_out_y, .lane_out_c,
    .ct_start, .ct_base, .ct_done, .ct_req, .ct_ready, .ct_rsp
  );

  for (genvar i = 0; i < PIX_PER_WORD; i++) begin : g_lane
    region_pixel u_region (
      .clk, .rst_n, .thr,
      .in_valid (lane_in_valid),
      .in_y     (lane_in_y[i]),
      .in_bg    (lane_in_bg[i]),
      .in_c     (lane_in_c[i]),
      .out_valid(lane_out_valid_v[i]),
      .out_y    (lane_out_y[i]),
      .out_c    (lane_out_c[i])
    );
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    zbt_ctrl u_zbt (
      .clk, .rst_n,
      .req      (bank_req[b]),
      .req_ready(bank_ready[b]),
      .rsp      (bank_rsp[b]),
      .pins     (zbt_pins[b]),
      .dq_i     (zbt_dq_i[b])
    );
  end

  contour #(.W(W), .H(H)) u_contour (
    .clk, .rst_n,
    .start    (ct_start),
    .base_addr(ct_base),
    .busy     (ct_busy),
    .done     (ct_done),
    .req      (ct_req),
    .req_ready(ct_ready),
    .rsp      (ct_rsp),
    .out_valid(tok_valid),
    .out_ready(tok_ready),
    .out_x    (tok_x),
    .out_y    (tok_y),
    .out_eop  (tok_eop)
  );

  // moments of one contour, from ellipse_moments to ellipse_axes
  logic                 mom_valid, mom_ready;
  logic [NW-1:0]        mom_n;
  logic [XW+FRAC-1:0]   mom_xavg;
  logic [YW+FRAC-1:0]   mom_yavg;
  logic signed [MW-1:0] mom_mxx, mom_myy, mom_mxy;

  ellipse_moments #(.W(W), .H(H), .FRAC(FRAC)) u_ellipse (
    .clk, .rst_n,
    .in_valid (tok_valid),
    .in_ready (tok_ready),
    .in_x     (tok_x),
    .in_y     (tok_y),
    .in_eop   (tok_eop),
    .out_valid(mom_valid),
    .out_ready(mom_ready),
    .out_n    (mom_n),
    .out_xavg (mom_xavg),
    .out_yavg (mom_yavg),
    .out_mxx  (mom_mxx),
    .out_myy  (mom_myy),
    .out_mxy  (mom_mxy)
  );

  ellipse_axes #(.W(W), .H(H), .FRAC(FRAC)) u_axes (
    .clk, .rst_n,
    .in_valid (mom_valid),
    .in_ready (mom_ready),
    .in_n     (mom_n),
    .in_xavg  (mom_xavg),
    .in_yavg  (mom_yavg),
    .in_mxx   (mom_mxx),
    .in_myy   (mom_myy),
    .in_mxy   (mom_mxy),
    .out_valid(ell_valid),
    .out_ready(ell_ready),
    .out_n    (ell_n),
    .out_xavg (ell_xavg),
    .out_yavg (ell_yavg),
    .out_mxx  (ell_mxx),
    .out_myy  (ell_myy),
    .out_mxy  (ell_mxy),
    .out_rot  (ell_rot),
    .out_ax   (ell_ax),
    .out_ay   (ell_ay)
  );

  // All four lanes run in lock step; Contour runs only in its own phases
  a_lanes: assert property (@(posedge clk) disable iff (!rst_n)
    lane_out_valid_v[0] == lane_out_valid_v[PIX_PER_WORD-1]);
  a_ct_phase: assert property (@(posedge clk) disable iff (!rst_n)
    ct_busy |-> (phase == PH_CONTOUR_Y || phase == PH_CONTOUR_C));

endmodule
