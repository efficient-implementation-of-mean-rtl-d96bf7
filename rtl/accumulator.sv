// Running-sum accumulator of the image-statistics core.
//
// One instance sums the pixels (i), one their squares (i^2) and one their
// cubes (i^3) over an image. Every clock the input term is added; `total` is
// the combinational sum of the stored value and the present term, so in the
// clock flagged by `restart` (the last pixel of an image) it is already the
// sum over the whole image. At that clock edge the register clears, so the
// next image starts from zero without an idle cycle.
//
// ACC_W must hold the sum of all terms of one image; the top sizes it as
// IN_W + log2(pixels per image), so it cannot overflow.
// Reset: synchronous, active high, clears the sum.
module accumulator #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 14
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             restart,   // present term is the last of the image
  input  logic [IN_W-1:0]  term,
  output logic [ACC_W-1:0] total      // stored sum + present term
);

  logic [ACC_W-1:0] acc_q;

  assign total = acc_q + ACC_W'(term);

  always_ff @(posedge clk) begin
    if (reset || restart) acc_q <= '0;
    else                  acc_q <= total;
  end

endmodule
