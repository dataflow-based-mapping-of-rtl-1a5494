// End-to-end testbench of gesture_fpga_top at a reduced image size (64 x 32),
// so that it runs in seconds. The test itself is shared with the full-size
// testbench; see gesture_tb_body.svh.
module tb_gesture_fpga_top;
  import hpdf_pkg::*;

  localparam int unsigned W = 64;
  localparam int unsigned H = 32;

`include "gesture_tb_body.svh"

  gesture_fpga_top #(.W(W), .H(H)) dut (.*);

endmodule
