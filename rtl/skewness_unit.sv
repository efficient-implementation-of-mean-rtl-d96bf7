// Skewness stage of the image-statistics core (Equation 7).
//
// skewness = E[i^3] - 3*mean*E[i^2] + 2*mean^3, with E[i^3], E[i^2] and mean
// the truncated image means of i^3, i^2 and i. The datapath is the one of the
// block diagram: a multiplier chain forms 3*mean*E[i^2], a subtractor takes it
// from E[i^3], another multiplier chain forms 2*mean^3, and an adder combines
// the two. All of this is done exactly in signed arithmetic of INT_W bits; the
// result is then cut to SKEW_W bits, two's complement. The default of 16
// output bits holds every value between -32768 and 32767; a full 8-bit pixel
// range needs SKEW_W = 27 (the value is not normalised). Combinational.
module skewness_unit #(
  parameter int unsigned MEAN_W = 8,
  parameter int unsigned E2_W   = 16,
  parameter int unsigned E3_W   = 24,
  parameter int unsigned SKEW_W = 16
) (
  input  logic [MEAN_W-1:0]        mean,
  input  logic [E2_W-1:0]          e2,
  input  logic [E3_W-1:0]          e3,
  output logic signed [SKEW_W-1:0] skewness
);

  // Wide enough for 3*mean*E[i^2] and 2*mean^3 plus a sign bit.
  localparam int unsigned P3 = MEAN_W + E2_W + 2;
  localparam int unsigned P2 = 3*MEAN_W + 1;
  localparam int unsigned PM = (P3 > P2) ? P3 : P2;
  localparam int unsigned INT_W = ((PM > E3_W) ? PM : E3_W) + 2;

  logic signed [INT_W-1:0] mean_s, e2_s, e3_s;
  logic signed [INT_W-1:0] three_mean_e2;   // 3 * mean * E[i^2]
  logic signed [INT_W-1:0] two_mean_cube;   // 2 * mean^3
  logic signed [INT_W-1:0] diff;            // E[i^3] - 3*mean*E[i^2]
  logic signed [INT_W-1:0] sum;

  always_comb begin
    mean_s        = INT_W'(mean);
    e2_s          = INT_W'(e2);
    e3_s          = INT_W'(e3);
    three_mean_e2 = INT_W'(3) * mean_s * e2_s;
    two_mean_cube = INT_W'(2) * mean_s * mean_s * mean_s;
    diff          = e3_s - three_mean_e2;
    sum           = diff + two_mean_cube;
    skewness      = SKEW_W'(sum);
  end

endmodule
