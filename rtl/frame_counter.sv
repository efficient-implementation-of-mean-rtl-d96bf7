// Pixel counter of the image-statistics core.
//
// Counts the pixels of the image that is streaming in, one per clock, and
// raises `last` during the clock in which the final pixel of the image is
// presented. The count then wraps to zero, so back-to-back images need no gap.
// This is the "counter" that decides when the results are sent; its width and
// the synchronous, active-high reset are this design's choices.
//
// Interface: clk, reset (synchronous, active high), count (pixel index of the
// current clock), last (count == N_PIXELS-1, combinational from the count).
module frame_counter #(
  parameter int unsigned N_PIXELS = 64
) (
  input  logic                            clk,
  input  logic                            reset,
  output logic [$clog2(N_PIXELS)-1:0]     count,
  output logic                            last
);

  localparam int unsigned CNT_W = $clog2(N_PIXELS);
  localparam logic [CNT_W-1:0] LAST_IDX = CNT_W'(N_PIXELS - 1);

  assign last = (count == LAST_IDX);

  always_ff @(posedge clk) begin
    if (reset)     count <= '0;
    else if (last) count <= '0;
    else           count <= count + 1'b1;
  end

endmodule
