// Streaming mean / variance / skewness core for grey-level images.
//
// The core computes three image statistics without building a histogram. It
// uses the moment form of the formulas:
//   mean     = S1 / NM
//   variance = S2 / NM - mean^2
//   skewness = S3 / NM - 3 * mean * (S2 / NM) + 2 * mean^3
// where S1, S2 and S3 are the sums of i, i^2 and i^3 over the NM pixels of an
// image. Each division is a right shift (NM is a power of two) that truncates,
// and the truncated quotients are what the later terms use, so the outputs are
// integer values: for the 8x8 reference image they are 14, 250 and 6526.
//
// Datapath: a power unit forms i^2 and i^3 of the incoming pixel; three
// accumulators sum i, i^2 and i^3; three shift-right registers divide the
// three sums by NM and hold the quotients; a variance stage (multiplier and
// subtractor) and a skewness stage (multipliers, subtractor and adder) form
// the results from the held quotients. A pixel counter marks the last pixel
// of each image.
//
// Interface and timing: one pixel enters on `datain` at every rising edge of
// `clock` while `reset` is low, in raster order, with no gaps; images follow
// each other back to back. The first pixel of the first image is the one
// sampled at the first edge with `reset` low. The edge that samples the last
// (NM-th) pixel of an image loads the quotients, so `meanout`, `varians` and
// `skweness` show that image's results from then on, NM clocks after its first
// pixel, and hold them until the next image has been read. `frame_done` pulses
// for one clock after each such edge; `result_valid` is low from reset until
// the first image has been read and high afterwards (before that the outputs
// are zero). `skweness` is two's complement. `reset` is synchronous and active
// high.
//
// The arithmetic, the three accumulators, the 6-bit shifts, the 64-clock
// latency and the port names and widths follow the published design; the
// reset style, the two status outputs, the zero outputs before the first
// result and the wrap-around of skewness values outside the 16-bit range are
// this implementation's choices.
module mean_var_skew
  import mvs_pkg::*;
#(
  parameter int unsigned PIX_W    = PIX_W_DEF,
  parameter int unsigned IMG_ROWS = IMG_ROWS_DEF,
  parameter int unsigned IMG_COLS = IMG_COLS_DEF,
  parameter int unsigned VAR_W    = VAR_W_DEF,
  parameter int unsigned SKEW_W   = SKEW_W_DEF
) (
  input  logic                     clock,
  input  logic                     reset,
  input  logic [PIX_W-1:0]         datain,
  output logic [PIX_W-1:0]         meanout,
  output logic [VAR_W-1:0]         varians,
  output logic signed [SKEW_W-1:0] skweness,
  output logic                     result_valid,
  output logic                     frame_done
);

  localparam int unsigned N_PIX = IMG_ROWS * IMG_COLS;
  localparam int unsigned SHIFT = $clog2(N_PIX);
  localparam int unsigned S1_W  = sum_width(PIX_W, N_PIX);
  localparam int unsigned S2_W  = sum_width(2*PIX_W, N_PIX);
  localparam int unsigned S3_W  = sum_width(3*PIX_W, N_PIX);

  // The divider is a shift, so the pixel count must be a power of two.
  if (N_PIX != (1 << SHIFT)) begin : g_bad_size
    $error("IMG_ROWS*IMG_COLS must be a power of two");
  end

  logic                  last;
  logic [2*PIX_W-1:0]    pix_sq;
  logic [3*PIX_W-1:0]    pix_cube;
  logic [S1_W-1:0]       s1;
  logic [S2_W-1:0]       s2;
  logic [S3_W-1:0]       s3;
  logic [PIX_W-1:0]      mean_q;
  logic [2*PIX_W-1:0]    e2_q;
  logic [3*PIX_W-1:0]    e3_q;

  frame_counter #(.N_PIXELS(N_PIX)) u_counter (
    .clk(clock), .reset, .count(), .last
  );

  power_unit #(.PIX_W(PIX_W)) u_power (
    .pix(datain), .pix_sq, .pix_cube
  );

  accumulator #(.IN_W(PIX_W), .ACC_W(S1_W)) u_acc_i (
    .clk(clock), .reset, .restart(last), .term(datain), .total(s1)
  );
  accumulator #(.IN_W(2*PIX_W), .ACC_W(S2_W)) u_acc_i2 (
    .clk(clock), .reset, .restart(last), .term(pix_sq), .total(s2)
  );
  accumulator #(.IN_W(3*PIX_W), .ACC_W(S3_W)) u_acc_i3 (
    .clk(clock), .reset, .restart(last), .term(pix_cube), .total(s3)
  );

  shift_right_register #(.IN_W(S1_W), .SHIFT(SHIFT)) u_div_i (
    .clk(clock), .reset, .load(last), .d(s1), .q(mean_q)
  );
  shift_right_register #(.IN_W(S2_W), .SHIFT(SHIFT)) u_div_i2 (
    .clk(clock), .reset, .load(last), .d(s2), .q(e2_q)
  );
  shift_right_register #(.IN_W(S3_W), .SHIFT(SHIFT)) u_div_i3 (
    .clk(clock), .reset, .load(last), .d(s3), .q(e3_q)
  );

  variance_unit #(.MEAN_W(PIX_W), .E2_W(2*PIX_W), .VAR_W(VAR_W)) u_var (
    .mean(mean_q), .e2(e2_q), .variance(varians)
  );

  skewness_unit #(.MEAN_W(PIX_W), .E2_W(2*PIX_W), .E3_W(3*PIX_W), .SKEW_W(SKEW_W)) u_skew (
    .mean(mean_q), .e2(e2_q), .e3(e3_q), .skewness(skweness)
  );

  assign meanout = mean_q;

  always_ff @(posedge clock) begin
    if (reset) begin
      result_valid <= 1'b0;
      frame_done   <= 1'b0;
    end else begin
      frame_done <= last;
      if (last) result_valid <= 1'b1;
    end
  end

endmodule
