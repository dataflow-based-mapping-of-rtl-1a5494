// End-to-end testbench of gesture_fpga_top with every parameter at its
// default: one full 384 x 240 image group is loaded, processed by Region,
// Contour and Ellipse, and unloaded. The test itself is shared with the
// reduced-size testbench; see gesture_tb_body.svh.
module tb_gesture_fpga_top_full;
  import hpdf_pkg::*;

  localparam int unsigned W = IMG_W;
  localparam int unsigned H = IMG_H;

`include "gesture_tb_body.svh"

  gesture_fpga_top dut (.*);

endmodule
