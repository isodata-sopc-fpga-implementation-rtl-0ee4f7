// threshold_register: the ISODATA threshold register and its +1 incrementer.
//
// Holds the current threshold T. `load` stores `d` (the initial threshold, or
// the average of the class means after an iteration). The incrementer gives
// T+1, the start level of the up-counter that scans class C2, and `is_max`
// flags T at the top level, when class C2 is empty and T+1 would wrap. Reset
// clears T to 0. Register and incrementer follow the document; `is_max` is
// this design's.
module threshold_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_plus1,
  output logic         is_max
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

  assign q_plus1 = q + 1'b1;
  assign is_max  = (q == '1);

endmodule
