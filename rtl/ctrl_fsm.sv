// Control state machine of the FPGA design.
//
// It sequences one image group through the board memory and the processing
// blocks. Each image has its own ZBT bank, with four consecutive pixels
// packed in each 32-bit word (pixel i in byte i%4 of word i/4):
//
//   LOAD       bytes from the host link are packed four to a word and written
//              to bank 0 (Image 1, Y), then bank 1 (Image 2, background), then
//              bank 2 (Image 3, Cr/Cb), W*H bytes each, in raster order.
//   REGION     banks 0-2 are read at the same address, one word per cycle; the
//              four pixels of each word go to four Region lanes side by side;
//              the lane results are written to bank 3 (Image 1') and bank 4
//              (Image 3') at the same address, in order. The pass takes
//              W*H/4 word cycles plus the pipeline fill.
//   CONTOUR_Y  the Contour block owns bank 3 and traces Image 1'.
//   CONTOUR_C  the Contour block owns bank 4 and traces Image 3'.
//   UNLOAD     banks 3 and 4 (now carrying the traced contours) are read back
//              and sent to the host byte by byte, honouring tx_ready.
//   DONE       done pulses for one cycle, then the machine waits for start.
//
// The five banks, the layout, the four-pixel parallelism, Region writing the
// two result images and Contour scanning them one after the other follow the
// design. The host link is a plain byte stream where a serial-port core
// attaches (rx has no back-pressure, so bytes are taken whenever rx_valid is
// high during LOAD); the unload step and the phase order are this design's
// choices. W*H must be a multiple of four.
module ctrl_fsm
  import hpdf_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output phase_e                phase,
  output logic                  done,
  // host byte streams
  input  logic                  rx_valid,
  input  logic [7:0]            rx_data,
  output logic                  tx_valid,
  input  logic                  tx_ready,
  output logic [7:0]            tx_data,
  // memory banks
  output mem_req_t              bank_req   [NUM_BANKS],
  input  logic                  bank_ready [NUM_BANKS],
  input  mem_rsp_t              bank_rsp   [NUM_BANKS],
  // Region lanes
  output logic                  lane_in_valid,
  output logic [7:0]            lane_in_y  [PIX_PER_WORD],
  output logic [7:0]            lane_in_bg [PIX_PER_WORD],
  output logic [7:0]            lane_in_c  [PIX_PER_WORD],
  input  logic                  lane_out_valid,
  input  logic [7:0]            lane_out_y [PIX_PER_WORD],
  input  logic [7:0]            lane_out_c [PIX_PER_WORD],
  // Contour block
  output logic                  ct_start,
  output logic [ZBT_ADDR_W-1:0] ct_base,
  input  logic                  ct_done,
  input  mem_req_t              ct_req,
  output logic                  ct_ready,
  output mem_rsp_t              ct_rsp
);

  localparam int unsigned NPIX   = W * H;
  localparam int unsigned NWORDS = NPIX / PIX_PER_WORD;
  localparam int unsigned WORDW  = $clog2(NWORDS + 1);

  logic [WORDW-1:0]      rd_addr, wr_addr;
  logic [1:0]            img;        // image being loaded / bank being unloaded
  logic [1:0]            byte_i;
  logic [23:0]           pack;       // bytes 0..2 of the word being loaded
  logic                  ld_we;
  logic [ZBT_DATA_W-1:0] ld_word;
  logic [WORDW-1:0]      ld_addr;
  logic [2:0]            ld_bank;
  logic [2:0]            un_bank;    // bank being unloaded
  logic                  un_wait;    // unload: read issued, data not yet back
  logic                  un_have;    // unload: word held, bytes being sent
  logic [ZBT_DATA_W-1:0] un_word;
  logic                  ct_go;

  // ---- bank requests ----
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_req[b]    = '0;
      bank_req[b].be = '1;
    end
    ct_ready = 1'b0;
    ct_rsp   = '0;
    unique case (phase)
      PH_LOAD: if (ld_we) begin
        bank_req[ld_bank].valid = 1'b1;
        bank_req[ld_bank].we    = 1'b1;
        bank_req[ld_bank].addr  = ZBT_ADDR_W'(ld_addr);
        bank_req[ld_bank].wdata = ld_word;
      end
      PH_REGION: begin
        for (int b = BANK_Y; b <= BANK_C; b++) begin
          bank_req[b].valid = (rd_addr < WORDW'(NWORDS));
          bank_req[b].addr  = ZBT_ADDR_W'(rd_addr);
        end
        for (int b = BANK_Y_OUT; b <= BANK_C_OUT; b++) begin
          bank_req[b].valid = lane_out_valid;
          bank_req[b].we    = 1'b1;
          bank_req[b].addr  = ZBT_ADDR_W'(wr_addr);
        end
        for (int i = 0; i < PIX_PER_WORD; i++) begin
          bank_req[BANK_Y_OUT].wdata[8*i +: 8] = lane_out_y[i];
          bank_req[BANK_C_OUT].wdata[8*i +: 8] = lane_out_c[i];
        end
      end
      PH_CONTOUR_Y: begin
        bank_req[BANK_Y_OUT] = ct_req;
        ct_ready = bank_ready[BANK_Y_OUT];
        ct_rsp   = bank_rsp[BANK_Y_OUT];
      end
      PH_CONTOUR_C: begin
        bank_req[BANK_C_OUT] = ct_req;
        ct_ready = bank_ready[BANK_C_OUT];
        ct_rsp   = bank_rsp[BANK_C_OUT];
      end
      PH_UNLOAD: if (!un_wait && !un_have) begin
        bank_req[un_bank].valid = 1'b1;
        bank_req[un_bank].addr  = ZBT_ADDR_W'(rd_addr);
      end
      default: ;
    endcase
  end

  // ---- Region lanes fed straight from the read data of banks 0-2 ----
  assign lane_in_valid = (phase == PH_REGION) && bank_rsp[BANK_Y].valid;
  always_comb begin
    for (int i = 0; i < PIX_PER_WORD; i++) begin
      lane_in_y[i]  = bank_rsp[BANK_Y].rdata[8*i +: 8];
      lane_in_bg[i] = bank_rsp[BANK_BG].rdata[8*i +: 8];
      lane_in_c[i]  = bank_rsp[BANK_C].rdata[8*i +: 8];
    end
  end

  assign tx_valid = (phase == PH_UNLOAD) && un_have;
  assign tx_data  = un_word[8*byte_i +: 8];
  assign un_bank  = 3'(BANK_Y_OUT) + {1'b0, img};
  assign ct_start = ct_go;
  assign ct_base  = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      done <= 1'b0;
      rd_addr <= '0; wr_addr <= '0; img <= '0; byte_i <= '0; pack <= '0;
      ld_we <= 1'b0; ld_word <= '0; ld_addr <= '0; ld_bank <= '0;
      un_wait <= 1'b0; un_have <= 1'b0; un_word <= '0;
      ct_go <= 1'b0;
    end else begin
      done  <= 1'b0;
      ld_we <= 1'b0;
      ct_go <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          img <= '0; byte_i <= '0; rd_addr <= '0; wr_addr <= '0;
          phase <= PH_LOAD;
        end

        PH_LOAD: begin
          if (rx_valid && img != 2'd3) begin
            byte_i <= byte_i + 1'b1;
            if (byte_i == 2'd3) begin
              ld_we   <= 1'b1;
              ld_word <= {rx_data, pack};
              ld_addr <= rd_addr;
              ld_bank <= {1'b0, img};
              if (rd_addr == WORDW'(NWORDS - 1)) begin
                rd_addr <= '0;
                img     <= img + 1'b1;
              end else begin
                rd_addr <= rd_addr + 1'b1;
              end
            end else begin
              pack[8*byte_i +: 8] <= rx_data;
            end
          end
          if (img == 2'd3 && !ld_we) begin
            img     <= '0;
            rd_addr <= '0;
            wr_addr <= '0;
            phase   <= PH_REGION;
          end
        end

        PH_REGION: begin
          if (bank_req[BANK_Y].valid && bank_ready[BANK_Y]) rd_addr <= rd_addr + 1'b1;
          if (lane_out_valid) begin
            if (wr_addr == WORDW'(NWORDS - 1)) begin
              ct_go <= 1'b1;
              phase <= PH_CONTOUR_Y;
            end
            wr_addr <= wr_addr + 1'b1;
          end
        end

        PH_CONTOUR_Y: if (ct_done) begin
          ct_go <= 1'b1;
          phase <= PH_CONTOUR_C;
        end

        PH_CONTOUR_C: if (ct_done) begin
          img <= '0; rd_addr <= '0; byte_i <= '0;
          un_wait <= 1'b0; un_have <= 1'b0;
          phase <= PH_UNLOAD;
        end

        PH_UNLOAD: begin
          if (!un_wait && !un_have) begin
            if (bank_ready[un_bank]) un_wait <= 1'b1;
          end else if (un_wait) begin
            if (bank_rsp[un_bank].valid) begin
              un_word <= bank_rsp[un_bank].rdata;
              un_wait <= 1'b0;
              un_have <= 1'b1;
              byte_i  <= '0;
            end
          end else if (tx_ready) begin
            byte_i <= byte_i + 1'b1;
            if (byte_i == 2'd3) begin
              un_have <= 1'b0;
              if (rd_addr == WORDW'(NWORDS - 1)) begin
                rd_addr <= '0;
                if (img == 2'd1) phase <= PH_DONE;
                else img <= img + 1'b1;
              end else begin
                rd_addr <= rd_addr + 1'b1;
              end
            end
          end
        end

        PH_DONE: begin
          done  <= 1'b1;
          phase <= PH_IDLE;
        end

        default: phase <= PH_IDLE;
      endcase
    end
  end

  // The three source banks answer in lock step during the Region pass
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_REGION) |-> (bank_rsp[BANK_Y].valid == bank_rsp[BANK_BG].valid &&
                              bank_rsp[BANK_Y].valid == bank_rsp[BANK_C].valid));

endmodule
