// max_comparator: comparator array that picks the largest of N values.
// Inputs without their valid bit take no part; on equal values the lower input
// position wins, so with indices in ascending order the lowest index wins.
// Outputs the winning value, its index and whether any input was valid.
// Combinational, N-1 comparators in a chain. Sizing it to the distances
// delivered per clock and the tie rule are this design's choices.
module max_comparator #(
  parameter int N  = 4,
  parameter int DW = 16,
  parameter int IW = 10
) (
  input  logic [N-1:0]          valid,
  input  logic [N-1:0][DW-1:0]  val,
  input  logic [N-1:0][IW-1:0]  idx,
  output logic                  max_valid,
  output logic [DW-1:0]         max_val,
  output logic [IW-1:0]         max_idx
);
  always_comb begin
    max_valid = 1'b0;
    max_val   = '0;
    max_idx   = '0;
    for (int i = 0; i < N; i++) begin
      if (valid[i] && (!max_valid || val[i] > max_val)) begin
        max_valid = 1'b1;
        max_val   = val[i];
        max_idx   = idx[i];
      end
    end
  end
endmodule
