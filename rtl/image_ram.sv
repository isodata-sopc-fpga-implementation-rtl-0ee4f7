// image_ram: on-chip image memory, DEPTH pixels of WIDTH bits.
//
// One write port and one read port with registered read data (latency one
// clock); a read of the word being written in the same cycle returns the old
// pixel. The image is loaded here by the processor, scanned by the histogram
// pass and rewritten in place by the binarizer. The document draws the image
// memory with an address, a read data and a write data port; the port split
// and latency are this design's own.
module image_ram #(
  parameter int unsigned DEPTH = 19200,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
