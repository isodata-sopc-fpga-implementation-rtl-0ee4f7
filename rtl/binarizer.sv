// binarizer: rewrites an image in place as a two-level image.
//
// After a pulse on `start`, an address generator walks the image memory from
// pixel 0 to NPIX-1, one pixel per clock. Each pixel read is compared with the
// ISODATA threshold and the multiplexer writes back BLACK (0) for a pixel at or
// below the threshold (background, class C1 = levels 0..T) and WHITE (255) for a
// pixel above it (foreground). The write goes to the address read one clock
// earlier, so the pass takes NPIX + 1 clocks; `done` pulses for one clock at
// the end and `busy` is high meanwhile. The memory read latency must be one
// clock. `threshold` must stay constant during the pass.
module binarizer
  import isodata_pkg::*;
#(
  parameter int unsigned NPIX    = 19200,
  parameter int unsigned PIX_W_P = PIX_W,
  localparam int unsigned AW = $clog2(NPIX)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PIX_W_P-1:0] threshold,
  output logic               busy,
  output logic               done,
  // image memory
  output logic [AW-1:0]      img_raddr,
  input  logic [PIX_W_P-1:0] img_rdata,
  output logic               img_we,
  output logic [AW-1:0]      img_waddr,
  output logic [PIX_W_P-1:0] img_wdata
);

  logic          reading;     // address generator running
  logic [AW-1:0] addr;
  logic          wr_valid;    // read data of wr_addr arrives this clock
  logic [AW-1:0] wr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      addr     <= '0;
      wr_valid <= 1'b0;
      wr_addr  <= '0;
      done     <= 1'b0;
    end else begin
      done     <= 1'b0;
      wr_valid <= reading;
      wr_addr  <= addr;
      if (start && !busy) begin
        reading <= 1'b1;
        addr    <= '0;
      end else if (reading) begin
        if (addr == AW'(NPIX - 1)) reading <= 1'b0;
        else                       addr    <= addr + 1'b1;
      end
      if (wr_valid && !reading) done <= 1'b1;
    end
  end

  assign busy      = reading || wr_valid;
  assign img_raddr = addr;
  assign img_we    = wr_valid;
  assign img_waddr = wr_addr;
  assign img_wdata = (img_rdata > threshold) ? PIX_W_P'(WHITE) : PIX_W_P'(BLACK);

endmodule
