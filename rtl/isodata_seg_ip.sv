// isodata_seg_ip: ISODATA image segmentation (binarization) peripheral.
//
// A processor writes a gray-scale image into the peripheral's image memory and
// starts it. The peripheral then, on its own: clears the 256 x 16-bit histogram
// memory, streams the image through the histogram unit, runs the ISODATA unit
// on the histogram to find the threshold T, and rewrites the image in place as
// 0 (pixel <= T) / 255 (pixel > T). It then raises `irq` and the DONE status
// bit, and the processor reads the binarized image back (for display or
// storage). If the ISODATA unit finds an empty class, the image is left
// unchanged and the ERROR bit is set instead.
//
// Bus: an Avalon-MM slave with 32-bit data and one-clock read latency
// (readdata valid the clock after an accepted read, flagged by
// `avs_readdatavalid`). Address bit AW selects the image (1: pixel index in the
// low AW bits, data bits 7:0) or the registers (0: address bits 1:0):
//   0 CTRL   write bit0 = 1 starts a run (ignored while busy)
//   1 STATUS bit0 busy, bit1 done, bit2 error
//   2 THRESH bits 7:0 the threshold of the last run
//   3 ITER   bits 7:0 ISODATA iterations of the last run
// Image accesses are held off with `avs_waitrequest` while a run is busy.
// `irq` follows the DONE bit, which a new start clears.
//
// The split into histogram, ISODATA and binarization hardware and the start /
// end-of-processing handshake with the processor follow the document; the
// register map, the on-chip image memory and its size (IMG_PIXELS, 160 x 120 by
// default) are this design's choices. The 16-bit histogram bins and class
// population accumulators limit an image to 65535 pixels.
module isodata_seg_ip
  import isodata_pkg::*;
#(
  parameter int unsigned IMG_PIXELS = 19200,
  localparam int unsigned AW = $clog2(IMG_PIXELS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // Avalon-MM slave
  input  logic [AW:0]   avs_address,
  input  logic          avs_read,
  input  logic          avs_write,
  input  logic [31:0]   avs_writedata,
  output logic [31:0]   avs_readdata,
  output logic          avs_readdatavalid,
  output logic          avs_waitrequest,
  output logic          irq
);

  seq_state_e seq;

  logic status_done, status_error;
  logic busy;
  assign busy = (seq != SEQ_IDLE);

  // ---------------------------------------------------------------- bus decode
  logic img_sel, acc_rd, acc_wr, start_cmd;
  assign img_sel         = avs_address[AW];
  assign avs_waitrequest = img_sel && busy && (avs_read || avs_write);
  assign acc_rd          = avs_read  && !avs_waitrequest;
  assign acc_wr          = avs_write && !avs_waitrequest;
  assign start_cmd       = acc_wr && !img_sel && avs_address[1:0] == REG_CTRL
                           && avs_writedata[0] && !busy;

  // ---------------------------------------------------------------- image memory
  logic          img_we;
  logic [AW-1:0] img_waddr, img_raddr;
  logic [7:0]    img_wdata, img_rdata;

  image_ram #(.DEPTH(IMG_PIXELS), .WIDTH(PIX_W)) u_image_ram (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  // ---------------------------------------------------------------- histogram memory
  logic [PIX_W-1:0] ha_addr, hb_addr;
  logic             hb_we;
  logic [BIN_W-1:0] hb_wdata, ha_rdata, hb_rdata;

  hist_dpram #(.DEPTH(LEVELS), .WIDTH(BIN_W)) u_hist_ram (
    .clk,
    .a_addr(ha_addr), .a_we(1'b0), .a_wdata('0), .a_rdata(ha_rdata),
    .b_addr(hb_addr), .b_we(hb_we), .b_wdata(hb_wdata), .b_rdata(hb_rdata)
  );

  // ---------------------------------------------------------------- histogram unit
  logic             hist_clear, hist_busy, hist_idle, hist_pv;
  logic [PIX_W-1:0] hist_raddr, hist_waddr;
  logic             hist_we;
  logic [BIN_W-1:0] hist_wdata;

  histogram_unit #(.LEVELS_P(LEVELS), .BIN_W_P(BIN_W)) u_histogram (
    .clk, .rst_n, .clear(hist_clear), .busy(hist_busy),
    .pix_valid(hist_pv), .pix(img_rdata), .idle(hist_idle),
    .ram_raddr(hist_raddr), .ram_rdata(ha_rdata),
    .ram_we(hist_we), .ram_waddr(hist_waddr), .ram_wdata(hist_wdata)
  );

  // ---------------------------------------------------------------- ISODATA unit
  logic             iso_start, iso_busy, iso_done, iso_error;
  logic [PIX_W-1:0] iso_thr, iso_c1_addr, iso_c2_addr;
  logic [7:0]       iso_iter;

  isodata_unit u_isodata (
    .clk, .rst_n, .start(iso_start), .busy(iso_busy), .done(iso_done),
    .error(iso_error), .threshold(iso_thr), .iterations(iso_iter),
    .c1_addr(iso_c1_addr), .c1_data(ha_rdata),
    .c2_addr(iso_c2_addr), .c2_data(hb_rdata)
  );

  // histogram memory port sharing: the histogram unit reads on A and writes on
  // B; the ISODATA unit reads on both.
  always_comb begin
    if (seq == SEQ_ISODATA) begin
      ha_addr  = iso_c1_addr;
      hb_addr  = iso_c2_addr;
      hb_we    = 1'b0;
      hb_wdata = '0;
    end else begin
      ha_addr  = hist_raddr;
      hb_addr  = hist_waddr;
      hb_we    = hist_we;
      hb_wdata = hist_wdata;
    end
  end

  // ---------------------------------------------------------------- binarizer
  logic          bin_start, bin_busy, bin_done, bin_we;
  logic [AW-1:0] bin_raddr, bin_waddr;
  logic [7:0]    bin_wdata;

  binarizer #(.NPIX(IMG_PIXELS), .PIX_W_P(PIX_W)) u_binarizer (
    .clk, .rst_n, .start(bin_start), .threshold(iso_thr),
    .busy(bin_busy), .done(bin_done),
    .img_raddr(bin_raddr), .img_rdata(img_rdata),
    .img_we(bin_we), .img_waddr(bin_waddr), .img_wdata(bin_wdata)
  );

  // ---------------------------------------------------------------- sequencer
  logic [AW-1:0] scan_addr;
  logic          scan_on;      // histogram pass issuing image reads

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq          <= SEQ_IDLE;
      scan_addr    <= '0;
      scan_on      <= 1'b0;
      hist_pv      <= 1'b0;
      status_done  <= 1'b0;
      status_error <= 1'b0;
    end else begin
      hist_pv <= scan_on;           // image read data valid one clock later
      unique case (seq)
        SEQ_IDLE: if (start_cmd) begin
          seq          <= SEQ_CLEAR;
          status_done  <= 1'b0;
          status_error <= 1'b0;
        end
        SEQ_CLEAR: if (!hist_busy) begin
          seq       <= SEQ_HIST;
          scan_on   <= 1'b1;
          scan_addr <= '0;
        end
        SEQ_HIST: begin
          if (scan_addr == AW'(IMG_PIXELS - 1)) begin
            scan_on <= 1'b0;
            seq     <= SEQ_DRAIN;
          end else begin
            scan_addr <= scan_addr + 1'b1;
          end
        end
        SEQ_DRAIN: if (hist_idle) seq <= SEQ_ISODATA;
        // done/error of the ISODATA unit hold the previous run's result
        // until it has taken the start pulse
        SEQ_ISODATA: if (iso_start) begin
          seq <= SEQ_ISODATA;
        end else if (iso_done) begin
          seq <= SEQ_BINARIZE;
        end else if (iso_error) begin
          seq          <= SEQ_IDLE;
          status_error <= 1'b1;
        end
        SEQ_BINARIZE: if (bin_done) begin
          seq         <= SEQ_IDLE;
          status_done <= 1'b1;
        end
        default: seq <= SEQ_IDLE;
      endcase
    end
  end

  // one-clock start pulses on entering a phase
  seq_state_e seq_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seq_q <= SEQ_IDLE;
    else        seq_q <= seq;
  end
  assign hist_clear = (seq == SEQ_CLEAR)    && (seq_q != SEQ_CLEAR);
  assign iso_start  = (seq == SEQ_ISODATA)  && (seq_q != SEQ_ISODATA);
  assign bin_start  = (seq == SEQ_BINARIZE) && (seq_q != SEQ_BINARIZE);

  // image memory port sharing
  always_comb begin
    unique case (seq)
      SEQ_HIST, SEQ_DRAIN: begin
        img_raddr = scan_addr;
        img_we    = 1'b0;
        img_waddr = '0;
        img_wdata = '0;
      end
      SEQ_BINARIZE: begin
        img_raddr = bin_raddr;
        img_we    = bin_we;
        img_waddr = bin_waddr;
        img_wdata = bin_wdata;
      end
      default: begin
        img_raddr = avs_address[AW-1:0];
        img_we    = acc_wr && img_sel && !busy;
        img_waddr = avs_address[AW-1:0];
        img_wdata = avs_writedata[7:0];
      end
    endcase
  end

  // ---------------------------------------------------------------- read data
  logic       rd_img_q;
  logic [1:0] rd_reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdatavalid <= 1'b0;
      rd_img_q          <= 1'b0;
      rd_reg_q          <= '0;
    end else begin
      avs_readdatavalid <= acc_rd;
      rd_img_q          <= img_sel;
      rd_reg_q          <= avs_address[1:0];
    end
  end

  always_comb begin
    avs_readdata = '0;
    if (rd_img_q) avs_readdata[7:0] = img_rdata;
    else unique case (rd_reg_q)
      REG_STATUS: avs_readdata[2:0] = {status_error, status_done, busy};
      REG_THRESH: avs_readdata[7:0] = iso_thr;
      REG_ITER:   avs_readdata[7:0] = iso_iter;
      default:    ;
    endcase
  end

  assign irq = status_done;

  no_image_access_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && img_sel && (acc_rd || acc_wr)));

endmodule
