// level_counter: 8-bit loadable gray-level counter (Count up / Count down).
//
// The ISODATA unit scans the two classes of the histogram with two of these:
// one counting down from the threshold T to level 0 (class C1) and one counting
// up from T+1 to level 255 (class C2). `load` sets the count to `load_val`;
// otherwise `en` steps it by one toward the end of its range. `last` is high
// while the count sits at the end of the range (0 counting down, the top level
// counting up). Load has priority over enable. The up/down pair and the load
// values come from the document; `last` and the priority are this design's.
module level_counter #(
  parameter int unsigned W  = 8,
  parameter bit          UP = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         en,
  output logic [W-1:0] count,
  output logic         last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (load) count <= load_val;
    else if (en)   count <= UP ? count + 1'b1 : count - 1'b1;
  end

  assign last = UP ? (count == '1) : (count == '0);

endmodule
