// threshold_comparator: convergence test of the ISODATA iteration.
//
// Compares the newly computed threshold with the one held in the threshold
// register. `equal` is the combinational result; when `en` is high the
// one-bit `done` register captures it, so `done` rises the cycle after an
// iteration whose new threshold equals the previous one. `clr` clears `done`
// (at the start of a run) and wins over `en`.
module threshold_comparator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] t_new,
  input  logic [W-1:0] t_old,
  output logic         equal,
  output logic         done
);

  assign equal = (t_new == t_old);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   done <= 1'b0;
    else if (clr) done <= 1'b0;
    else if (en)  done <= equal;
  end

endmodule
