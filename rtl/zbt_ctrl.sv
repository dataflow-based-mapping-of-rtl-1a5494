// Controller for one bank of pipelined ZBT (zero-bus-turnaround) SRAM.
//
// The board carries five independent 512K x 32 ZBT banks; each bank gets its
// own controller. A ZBT SRAM samples a command on every clock edge and moves
// the data two edges later for reads and writes alike, so reads and writes
// can follow each other back to back with no idle cycle. This controller
// registers each request onto the pins, drives the write data two cycles
// after the command and captures read data two cycles after the command, so
// it accepts one request every cycle (req_ready is always high).
//
// Timing, counted in clock edges after the edge that accepts a request:
//   edge 1  SRAM samples address/control
//   edge 3  SRAM takes write data / controller captures read data;
//           rsp.valid is high in the cycle that follows (read latency 3)
// Responses return in request order. Byte writes use req.be (active high
// here, driven active low on bw_n). Bursts are not used (adv_ld_n held low,
// every access loads its own address); clock enable is held active. The
// exact pin list and the three-cycle latency are this design's choices.
module zbt_ctrl
  import hpdf_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // user side
  input  mem_req_t              req,
  output logic                  req_ready,
  output mem_rsp_t              rsp,
  // SRAM side
  output zbt_pins_t             pins,
  input  logic [ZBT_DATA_W-1:0] dq_i
);

  typedef struct packed {
    logic                  valid;
    logic                  we;
    logic [ZBT_DATA_W-1:0] wdata;
  } data_stage_t;

  data_stage_t d0, d1, d2;  // command on pins / sampled by SRAM / data phase
  logic [ZBT_ADDR_W-1:0] p_addr;
  logic                  p_cs_n, p_we_n;
  logic [ZBT_BE_W-1:0]   p_bw_n;

  assign req_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_addr <= '0;
      p_cs_n <= 1'b1;
      p_we_n <= 1'b1;
      p_bw_n <= '1;
      d0 <= '0; d1 <= '0; d2 <= '0;
      rsp <= '0;
    end else begin
      // command phase
      p_addr <= req.addr;
      p_cs_n <= ~req.valid;
      p_we_n <= ~(req.valid & req.we);
      p_bw_n <= (req.valid & req.we) ? ~req.be : '1;
      d0.valid  <= req.valid;
      d0.we     <= req.we;
      d0.wdata  <= req.wdata;
      // pipeline toward the data phase
      d1 <= d0;
      d2 <= d1;
      // read capture at the end of the data phase
      rsp.valid <= d2.valid & ~d2.we;
      rsp.rdata <= dq_i;
    end
  end

  always_comb begin
    pins.addr     = p_addr;
    pins.cs_n     = p_cs_n;
    pins.we_n     = p_we_n;
    pins.bw_n     = p_bw_n;
    pins.adv_ld_n = 1'b0;
    pins.cke_n    = 1'b0;
    pins.dq_o     = d2.wdata;
    pins.dq_oe    = d2.valid & d2.we;
    pins.oe_n     = d2.valid & d2.we;
  end

  // A write drives the bus only in its own data phase
  a_no_drive_on_read: assert property (@(posedge clk) disable iff (!rst_n)
    (d2.valid && !d2.we) |-> !pins.dq_oe);

endmodule
