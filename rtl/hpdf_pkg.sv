// Shared constants and types of the gesture-recognition front end.
//
// Image geometry (384 x 240 pixels, one byte per pixel), the ZBT SRAM bank
// geometry (five banks of 512K x 32-bit words) and the memory layout
// (each image in its own bank, four consecutive pixels per 32-bit word) are
// those of the board and images the design was built for. The pixel codes
// used for marked images (region, contour, background) and the memory
// request/response structures are this design's own choices.
package hpdf_pkg;

  // Image geometry
  localparam int unsigned IMG_W       = 384;
  localparam int unsigned IMG_H       = 240;
  localparam int unsigned PIX_PER_WORD = 4;  // four pixels in the four bytes of a word

  // ZBT SRAM geometry
  localparam int unsigned NUM_BANKS   = 5;
  localparam int unsigned ZBT_ADDR_W  = 19;  // 512K words
  localparam int unsigned ZBT_DATA_W  = 32;  // parity bits unused
  localparam int unsigned ZBT_BE_W    = ZBT_DATA_W / 8;

  // Bank use: one image per bank
  localparam int unsigned BANK_Y      = 0;   // Image 1: luminance Y
  localparam int unsigned BANK_BG     = 1;   // Image 2: background
  localparam int unsigned BANK_C      = 2;   // Image 3: Cr/Cb
  localparam int unsigned BANK_Y_OUT  = 3;   // Image 1'
  localparam int unsigned BANK_C_OUT  = 4;   // Image 3'

  // Pixel codes of the marked (binary) images
  localparam logic [7:0] PIX_BG      = 8'h00;
  localparam logic [7:0] PIX_REGION  = 8'hFF;
  localparam logic [7:0] PIX_CONTOUR = 8'h80;

  // Region thresholds thold1..thold5
  typedef struct packed {
    logic [7:0] t1;  // B: Image 3 > t1
    logic [7:0] t2;  // C: |I1 - I2| > t2
    logic [7:0] t3;  // C: t3 > Image 1
    logic [7:0] t4;  // C: Image 1 > t4
    logic [7:0] t5;  // D: |I1 - I2| > t5
  } region_thr_t;

  // One request to a memory bank (read or byte-masked write)
  typedef struct packed {
    logic                  valid;
    logic                  we;
    logic [ZBT_ADDR_W-1:0] addr;
    logic [ZBT_BE_W-1:0]   be;
    logic [ZBT_DATA_W-1:0] wdata;
  } mem_req_t;

  // Read data returning from a bank, in request order
  typedef struct packed {
    logic                  valid;
    logic [ZBT_DATA_W-1:0] rdata;
  } mem_rsp_t;

  // Pins of one ZBT SRAM bank driven by the FPGA
  typedef struct packed {
    logic [ZBT_ADDR_W-1:0] addr;
    logic                  cs_n;
    logic                  we_n;
    logic                  adv_ld_n;
    logic                  cke_n;
    logic                  oe_n;
    logic [ZBT_BE_W-1:0]   bw_n;
    logic [ZBT_DATA_W-1:0] dq_o;
    logic                  dq_oe;
  } zbt_pins_t;

  // Top-level phase reported by the control state machine
  typedef enum logic [2:0] {
    PH_IDLE, PH_LOAD, PH_REGION, PH_CONTOUR_Y, PH_CONTOUR_C, PH_UNLOAD, PH_DONE
  } phase_e;

endpackage
