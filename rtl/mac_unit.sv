// mac_unit: multiply-accumulate of one histogram class (its first moment).
//
// Each enabled cycle adds count * level to a MOM_W-bit accumulator, where
// `count` is the histogram bin read from the memory and `level` is the gray
// level (the address the level counter gave the memory). After a class scan the
// accumulator holds sum(h(g) * g) over the class. `clr` zeroes it and wins over
// `en`. The product is combinational and only the accumulator is registered (32
// flip-flops, as in the published synthesis table); the 16 x 8 product maps to
// two 9-bit hardware multipliers on the target FPGA.
module mac_unit #(
  parameter int unsigned A_W   = 16,
  parameter int unsigned B_W   = 8,
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [A_W-1:0]   count,
  input  logic [B_W-1:0]   level,
  output logic [ACC_W-1:0] acc
);

  logic [A_W+B_W-1:0] product;

  assign product = count * level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc + ACC_W'(product);
  end

endmodule
