// mean_average: new ISODATA threshold T = floor((m1 + m2) / 2).
//
// The two class means are added in W+1 bits and the sum is shifted right by
// one, the "shift register" stage of the threshold compute unit. Purely
// combinational; the result always fits W bits.
module mean_average #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] mean1,
  input  logic [W-1:0] mean2,
  output logic [W-1:0] avg
);

  logic [W:0] sum;

  assign sum = {1'b0, mean1} + {1'b0, mean2};
  assign avg = sum[W:1];

endmodule
