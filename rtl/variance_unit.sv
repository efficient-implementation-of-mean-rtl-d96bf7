// Variance stage of the image-statistics core (Equation 6).
//
// variance = E[i^2] - mean^2, where E[i^2] is the truncated mean of the
// squared pixels and mean the truncated pixel mean: one multiplier squares the
// mean and one subtractor removes it. Because floor(mean)^2 never exceeds
// floor(E[i^2]), the difference is never negative, and it always fits in
// 2*MEAN_W bits. Combinational.
module variance_unit #(
  parameter int unsigned MEAN_W = 8,
  parameter int unsigned E2_W   = 16,
  parameter int unsigned VAR_W  = 16
) (
  input  logic [MEAN_W-1:0] mean,
  input  logic [E2_W-1:0]   e2,
  output logic [VAR_W-1:0]  variance
);

  localparam int unsigned W = (E2_W > 2*MEAN_W) ? E2_W : 2*MEAN_W;

  logic [W-1:0] mean_sq;
  logic [W-1:0] diff;

  always_comb begin
    mean_sq  = W'(mean) * W'(mean);
    diff     = W'(e2) - mean_sq;
    variance = VAR_W'(diff);
  end

endmodule
