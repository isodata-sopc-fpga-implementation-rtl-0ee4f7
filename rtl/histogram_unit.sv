// histogram_unit: builds the gray-level histogram h[i] = number of pixels
// equal to i in a histogram memory.
//
// How it works: the pixel value is the memory address (the "decoder"). The bin
// is read, a 16-bit adder adds 1, the sum is held in a 16-bit register and
// written back to the same bin. The memory read takes one clock, so the
// read-modify-write is a three-stage pipeline (read, add, write) accepting one
// pixel per clock. A pixel that hits the bin of one of the two pixels ahead of
// it would read a stale count; the adder then takes the newer count from the
// write register (one ahead) or from a one-cycle copy of it (two ahead). The
// forwarding is this design's own; the read/add/register/write loop is the
// document's.
//
// Before a histogram, a pulse on `clear` writes zero into every bin, one per
// clock (LEVELS clocks), while `busy` is high. Pixels must not be sent during
// a clear. `idle` is high when no pixel is left in the pipeline, so the memory
// holds the finished histogram.
//
// Memory side: `ram_raddr`/`ram_rdata` go to one read port (data one clock after
// the address), `ram_we`/`ram_waddr`/`ram_wdata` to the other port. Bins wrap
// at 2^BIN_W; an image of at most 65535 pixels cannot overflow one.
module histogram_unit
  import isodata_pkg::*;
#(
  parameter int unsigned LEVELS_P = LEVELS,
  parameter int unsigned BIN_W_P  = BIN_W,
  localparam int unsigned AW = $clog2(LEVELS_P)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  output logic               busy,
  input  logic               pix_valid,
  input  logic [AW-1:0]      pix,
  output logic               idle,
  // histogram memory
  output logic [AW-1:0]      ram_raddr,
  input  logic [BIN_W_P-1:0] ram_rdata,
  output logic               ram_we,
  output logic [AW-1:0]      ram_waddr,
  output logic [BIN_W_P-1:0] ram_wdata
);

  // clear sequencer
  logic          clearing;
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0;
      clr_addr <= '0;
    end else if (clear && !clearing) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(LEVELS_P - 1)) clearing <= 1'b0;
    end
  end

  assign busy = clearing || clear;

  // stage 1: bin address whose read data arrives this cycle
  logic          s1_valid;
  logic [AW-1:0] s1_addr;
  // stage 2: the 16-bit register holding the incremented bin (being written)
  logic               s2_valid;
  logic [AW-1:0]      s2_addr;
  logic [BIN_W_P-1:0] s2_cnt;
  // stage 3: copy of the last write, not yet visible to a read issued with it
  logic               s3_valid;
  logic [AW-1:0]      s3_addr;
  logic [BIN_W_P-1:0] s3_cnt;

  logic [BIN_W_P-1:0] base, incr;

  always_comb begin
    if (s2_valid && s2_addr == s1_addr)      base = s2_cnt;
    else if (s3_valid && s3_addr == s1_addr) base = s3_cnt;
    else                                     base = ram_rdata;
    incr = base + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_addr  <= '0;
      s2_valid <= 1'b0;
      s2_addr  <= '0;
      s2_cnt   <= '0;
      s3_valid <= 1'b0;
      s3_addr  <= '0;
      s3_cnt   <= '0;
    end else begin
      s1_valid <= pix_valid && !busy;
      s1_addr  <= pix;
      s2_valid <= s1_valid;
      s2_addr  <= s1_addr;
      s2_cnt   <= incr;
      s3_valid <= s2_valid;
      s3_addr  <= s2_addr;
      s3_cnt   <= s2_cnt;
    end
  end

  assign ram_raddr = pix;
  assign ram_we    = clearing || s2_valid;
  assign ram_waddr = clearing ? clr_addr : s2_addr;
  assign ram_wdata = clearing ? '0 : s2_cnt;
  assign idle      = !s1_valid && !s2_valid && !pix_valid;

  no_pixel_while_clearing: assert property (@(posedge clk) disable iff (!rst_n)
    !(pix_valid && busy));

endmodule
