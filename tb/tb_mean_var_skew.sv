// End-to-end testbench of mean_var_skew at its default parameters
// (8-bit pixels, 8x8 images, 16-bit variance and skewness outputs).
//
// It streams images back to back, one pixel per clock, and after the last
// pixel of each image compares meanout, varians and skweness with
// floor(S1/64), floor(S2/64) - mean^2 and
// floor(S3/64) - 3*mean*floor(S2/64) + 2*mean^3 (low 16 bits), which the
// testbench forms itself from the pixels in 64-bit integers. The first image
// is the 8x8 reference image whose integer results are known to be 14, 250
// and 6526; it is also checked against those constants.
//
// Also checked: the results appear 64 clocks after an image's first pixel;
// they are held unchanged while the next image streams in; frame_done pulses
// once per image; result_valid stays low until the first result; a reset in
// the middle of an image discards it. Mechanisms counted (each must occur):
// back-to-back images, held results, mid-image reset, negative skewness,
// skewness outside the 16-bit range.
module tb_mean_var_skew;
  localparam int unsigned NPIX = 64;

  logic clock = 1'b0;
  logic reset;
  logic [7:0] datain;
  logic [7:0] meanout;
  logic [15:0] varians;
  logic signed [15:0] skweness;
  logic result_valid, frame_done;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_held = 0, n_mid_reset = 0, n_neg_skew = 0, n_wide_skew = 0;

  // The 8x8 reference image, raster order.
  byte unsigned ref_img[NPIX] = '{
    6, 6,  6,  6, 10, 10,  8,  8,
    6, 6, 48, 48, 10, 10,  8,  8,
    6, 6, 48, 48, 10, 10,  8,  8,
    6, 6, 48, 48, 13, 13, 10, 10,
    6, 6,  6, 52, 13, 13, 10, 10,
    5, 5,  5, 52, 13, 13, 10, 10,
    5, 5,  5, 52,  4,  4, 12, 12,
    5, 5,  5, 52,  4,  4, 12, 12
  };

  byte unsigned img[NPIX];
  longint exp_mean, exp_var, exp_skew;

  mean_var_skew dut (
    .clock, .reset, .datain, .meanout, .varians, .skweness, .result_valid, .frame_done
  );

  always #50 clock = ~clock;   // 100 ns clock period

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (mean=%0d var=%0d skew=%0d)", what, meanout, varians, skweness);
    end
  endtask

  function automatic void model();
    longint s1 = 0, s2 = 0, s3 = 0, p;
    for (int k = 0; k < NPIX; k++) begin
      p = longint'(img[k]);
      s1 += p; s2 += p * p; s3 += p * p * p;
    end
    exp_mean = s1 / NPIX;
    exp_var  = s2 / NPIX - exp_mean * exp_mean;
    exp_skew = s3 / NPIX - 3 * exp_mean * (s2 / NPIX) + 2 * exp_mean * exp_mean * exp_mean;
  endfunction

  // Streams img[] starting one delta after a rising edge; returns one delta
  // after the edge that sampled the last pixel. While the image streams, the
  // previous results must stay on the outputs.
  task automatic stream_image(input bit have_prev);
    logic [7:0] pm; logic [15:0] pv; logic signed [15:0] ps;
    int t_first, t_done;
    pm = meanout; pv = varians; ps = skweness;
    t_first = cycle;
    for (int k = 0; k < NPIX; k++) begin
      datain = img[k];
      if (k > 0) begin
        check(frame_done == 1'b0, "frame_done only after the last pixel");
        if (have_prev)
          check(meanout == pm && varians == pv && skweness == ps, "results held during next image");
      end
      @(posedge clock); #1;
    end
    t_done = cycle;
    if (have_prev) n_held++;
    check(t_done - t_first == NPIX, "latency of 64 clocks");
    check(frame_done == 1'b1 && result_valid == 1'b1, "frame_done / result_valid after last pixel");
    model();
    check(longint'(meanout) == exp_mean, "mean");
    check(longint'(varians) == exp_var, "variance");
    check(skweness == 16'(exp_skew), "skewness");
    if (exp_skew < 0) n_neg_skew++;
    if (exp_skew > 32767 || exp_skew < -32768) n_wide_skew++;
  endtask

  int cycle = 0;
  always @(posedge clock) cycle++;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; datain = '0;
    repeat (3) @(posedge clock);
    #1;
    check(result_valid == 1'b0 && meanout == 0 && varians == 0 && skweness == 0,
          "outputs cleared by reset");
    reset = 1'b0;

    // Reference image.
    img = ref_img;
    stream_image(1'b0);
    check(meanout == 8'd14 && varians == 16'd250 && skweness == 16'sd6526,
          "reference image gives 14 / 250 / 6526");

    // Random and shaped images, back to back.
    for (int f = 0; f < 40; f++) begin
      int base;
      base = int'($urandom % 256);
      for (int k = 0; k < NPIX; k++) begin
        case (f % 4)
          0: img[k] = 8'($urandom);
          1: img[k] = (k < 8) ? 8'(255 - $urandom % 64) : 8'($urandom % 64);  // skewed right
          2: img[k] = (k < 8) ? 8'($urandom % 64) : 8'(255 - $urandom % 64);  // skewed left
          default: img[k] = (k < 60) ? 8'(base) : 8'($urandom);              // one mode
        endcase
      end
      stream_image(1'b1);
      n_back_to_back++;
    end

    // A reset in the middle of an image throws the partial image away.
    for (int k = 0; k < 20; k++) begin
      datain = 8'd255;
      @(posedge clock); #1;
    end
    reset = 1'b1;
    @(posedge clock); #1;
    reset = 1'b0;
    check(result_valid == 1'b0 && meanout == 0, "reset clears results");
    n_mid_reset++;
    img = ref_img;
    stream_image(1'b0);
    check(meanout == 8'd14 && varians == 16'd250 && skweness == 16'sd6526,
          "reference image after mid-image reset");

    check(n_back_to_back > 0, "back-to-back images occurred");
    check(n_held > 0, "held results occurred");
    check(n_mid_reset > 0, "mid-image reset occurred");
    check(n_neg_skew > 0, "negative skewness occurred");
    check(n_wide_skew > 0, "skewness beyond 16 bits occurred");
    $display("mechanisms: back_to_back=%0d held=%0d mid_reset=%0d neg_skew=%0d wide_skew=%0d",
             n_back_to_back, n_held, n_mid_reset, n_neg_skew, n_wide_skew);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
