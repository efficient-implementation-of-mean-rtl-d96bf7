// Divide-by-2^SHIFT register of the image-statistics core.
//
// Divides an image sum by the pixel count, a power of two, with a right shift
// of SHIFT bits (6 for 64 pixels), which truncates the quotient like an
// integer division. The quotient is captured when `load` is high (the last
// pixel of an image) and held until the next image ends, so the register also
// acts as the output buffer that keeps a result on the outputs for a whole
// image time. Reset (synchronous, active high) clears it to zero.
module shift_right_register #(
  parameter int unsigned IN_W  = 14,
  parameter int unsigned SHIFT = 6
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  load,
  input  logic [IN_W-1:0]       d,
  output logic [IN_W-SHIFT-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)     q <= '0;
    else if (load) q <= d[IN_W-1:SHIFT];
  end

endmodule
