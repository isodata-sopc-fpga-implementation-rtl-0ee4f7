// sum_acc: accumulating adder (Add-Acc) of one histogram class.
//
// Each enabled cycle adds the histogram bin `count` to an ACC_W-bit
// accumulator, so after a class scan it holds the class population
// sum(h(g)). `clr` zeroes it and wins over `en`. 16 bits as in the published
// synthesis table, which limits an image to 65535 pixels.
module sum_acc #(
  parameter int unsigned A_W   = 16,
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [A_W-1:0]   count,
  output logic [ACC_W-1:0] acc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (clr) acc <= '0;
    else if (en)  acc <= acc + ACC_W'(count);
  end

endmodule
