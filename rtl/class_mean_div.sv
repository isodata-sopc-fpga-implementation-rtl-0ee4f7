// class_mean_div: mean gray level of one class (Mean C1 / Mean C2).
//
// Combinational restoring divider: mean = floor(moment / population), where
// `moment` comes from the class MAC and `population` from its Add-Acc. The
// document gives these units as purely combinational (logic elements, no
// registers); the restoring algorithm and the floor rounding are this design's.
// The quotient is computed to NUM_W bits and its low Q_W bits are output: for a
// histogram class the mean never exceeds the top gray level, so nothing is
// lost. A zero population gives 0; the ISODATA controller treats that case as
// an empty class before it uses the mean.
module class_mean_div #(
  parameter int unsigned NUM_W = 32,
  parameter int unsigned DEN_W = 16,
  parameter int unsigned Q_W   = 8
) (
  input  logic [NUM_W-1:0] moment,
  input  logic [DEN_W-1:0] population,
  output logic [Q_W-1:0]   mean
);

  logic [NUM_W-1:0] quot;
  logic [DEN_W:0]   rem;     // one bit wider than the divisor

  always_comb begin
    quot = '0;
    rem  = '0;
    for (int i = NUM_W - 1; i >= 0; i--) begin
      rem = {rem[DEN_W-1:0], moment[i]};
      if (rem >= {1'b0, population}) begin
        rem     = rem - {1'b0, population};
        quot[i] = 1'b1;
      end
    end
    if (population == '0) quot = '0;
  end

  assign mean = quot[Q_W-1:0];

endmodule
