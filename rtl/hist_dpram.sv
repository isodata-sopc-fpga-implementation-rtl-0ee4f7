// hist_dpram: true dual-port histogram memory, DEPTH x WIDTH (256 x 16 bits,
// 4 Kbit, by default).
//
// Each of the two ports has its own address, write enable and write data, and a
// registered read data output (read latency one clock). A read on one port in
// the same cycle as a write to that address on the other port returns the old
// contents. The histogram builder uses port A to read and port B to write; the
// ISODATA unit reads both ports at once, one per class. The size follows the
// published memory; the one-cycle synchronous read is this design's choice,
// matching an FPGA block RAM.
module hist_dpram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B
  input  logic [AW-1:0]    b_addr,
  input  logic             b_we,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

  // Both ports writing one word in the same cycle has no defined result.
  a_no_write_collision: assert property (@(posedge clk)
    !(a_we && b_we && a_addr == b_addr));

endmodule
