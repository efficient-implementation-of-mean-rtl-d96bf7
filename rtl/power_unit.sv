// Pixel power generator of the image-statistics core.
//
// Forms the square and the cube of the incoming grey level, the terms that the
// second and third accumulators sum (i^2 and i^3 in Equations 6 and 7). It is
// two unsigned multipliers in series: i*i, then (i*i)*i. The results are exact,
// 2*PIX_W and 3*PIX_W bits wide. Purely combinational, no latency.
module power_unit #(
  parameter int unsigned PIX_W = 8
) (
  input  logic [PIX_W-1:0]   pix,
  output logic [2*PIX_W-1:0] pix_sq,
  output logic [3*PIX_W-1:0] pix_cube
);

  always_comb begin
    pix_sq   = (2*PIX_W)'(pix) * (2*PIX_W)'(pix);
    pix_cube = (3*PIX_W)'(pix_sq) * (3*PIX_W)'(pix);
  end

endmodule
