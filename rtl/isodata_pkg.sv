// isodata_pkg: widths and shared types of the ISODATA segmentation IP.
//
// The gray level is 8 bits (256 levels, output pixels 0 or 255), a histogram
// bin is 16 bits (256 x 16-bit histogram memory), a class population
// accumulator is 16 bits and a class moment accumulator is 32 bits; these
// follow the register counts of the published synthesis table. The register
// map of the Avalon-MM slave is this design's own choice.
package isodata_pkg;

  localparam int unsigned PIX_W   = 8;              // gray-level width
  localparam int unsigned LEVELS  = 1 << PIX_W;     // 256 intensity levels
  localparam int unsigned BIN_W   = 16;             // histogram bin width
  localparam int unsigned SUM_W   = 16;             // class population (Add-Acc)
  localparam int unsigned MOM_W   = 32;             // class moment (MAC)

  localparam logic [PIX_W-1:0] BLACK = '0;          // background value
  localparam logic [PIX_W-1:0] WHITE = '1;          // foreground value (255)

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [BIN_W-1:0] bin_t;

  // Register map (word addresses) of the control/status block.
  localparam logic [1:0] REG_CTRL   = 2'd0;  // write bit0 = start
  localparam logic [1:0] REG_STATUS = 2'd1;  // bit0 busy, bit1 done, bit2 error
  localparam logic [1:0] REG_THRESH = 2'd2;  // final ISODATA threshold
  localparam logic [1:0] REG_ITER   = 2'd3;  // iterations used

  // Top-level sequence of one segmentation run.
  typedef enum logic [2:0] {
    SEQ_IDLE,
    SEQ_CLEAR,     // zero the histogram memory
    SEQ_HIST,      // stream the image through the histogram unit
    SEQ_DRAIN,     // let the histogram pipeline finish its writes
    SEQ_ISODATA,   // run the threshold iterations
    SEQ_BINARIZE   // rewrite the image as 0 / 255
  } seq_state_e;

endpackage
