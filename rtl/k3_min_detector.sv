// K3 MINDETECTOR: finds the state with the smallest path metric.
//
// Compares the four path metrics and outputs the index (state identifier)
// of the smallest; on a tie the lowest index wins. Purely combinational.
//
// Follows the source: four metrics in, the best state's identifier out.
// This design's own choice: the tie rule.
module k3_min_detector #(
  parameter int unsigned PM_W = 5
) (
  input  logic [PM_W-1:0] PathMetric [4],
  output logic [1:0]      Min_State
);

  logic [PM_W-1:0] best;

  always_comb begin
    best      = PathMetric[0];
    Min_State = 2'd0;
    for (int s = 1; s < 4; s++) begin
      if (PathMetric[s] < best) begin
        best      = PathMetric[s];
        Min_State = 2'(s);
      end
    end
  end

endmodule
