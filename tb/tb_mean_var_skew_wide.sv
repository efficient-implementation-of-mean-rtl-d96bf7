// Testbench of mean_var_skew at a non-default size: 16x16 images (256
// pixels, so every division is an 8-bit shift) and a 27-bit skewness output,
// which holds the third moment of any 8-bit image exactly. It streams 30
// images back to back, among them the most skewed ones possible (one pixel
// far from all others), and compares each result with
// floor(S1/256), floor(S2/256) - mean^2 and
// floor(S3/256) - 3*mean*floor(S2/256) + 2*mean^3 computed by the testbench
// in 64-bit integers, including the 256-clock latency.
module tb_mean_var_skew_wide;
  localparam int unsigned ROWS = 16, COLS = 16, NPIX = ROWS * COLS;
  localparam int unsigned SKEW_W = 27;

  logic clock = 1'b0;
  logic reset;
  logic [7:0] datain;
  logic [7:0] meanout;
  logic [15:0] varians;
  logic signed [SKEW_W-1:0] skweness;
  logic result_valid, frame_done;
  int checks = 0, failures = 0, n_beyond16 = 0;
  int cycle = 0;
  byte unsigned img[NPIX];

  mean_var_skew #(.IMG_ROWS(ROWS), .IMG_COLS(COLS), .SKEW_W(SKEW_W)) dut (
    .clock, .reset, .datain, .meanout, .varians, .skweness, .result_valid, .frame_done
  );

  always #50 clock = ~clock;
  always @(posedge clock) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (mean=%0d var=%0d skew=%0d)", what, meanout, varians, skweness);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s1, s2, s3, p, m, e2, e3, ev, es;
    int t0;
    reset = 1'b1; datain = '0;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    for (int f = 0; f < 30; f++) begin
      for (int k = 0; k < NPIX; k++) begin
        case (f % 3)
          0: img[k] = 8'($urandom);
          1: img[k] = (k == 5) ? 8'd255 : 8'd0;        // extreme right skew
          default: img[k] = (k == 7) ? 8'd0 : 8'd255;  // extreme left skew
        endcase
      end
      s1 = 0; s2 = 0; s3 = 0;
      t0 = cycle;
      for (int k = 0; k < NPIX; k++) begin
        datain = img[k];
        p = longint'(img[k]);
        s1 += p; s2 += p * p; s3 += p * p * p;
        @(posedge clock); #1;
      end
      m = s1 / NPIX; e2 = s2 / NPIX; e3 = s3 / NPIX;
      ev = e2 - m * m;
      es = e3 - 3 * m * e2 + 2 * m * m * m;
      if (es > 32767 || es < -32768) n_beyond16++;
      check(cycle - t0 == NPIX, "latency of one image time");
      check(frame_done && result_valid, "frame_done / result_valid");
      check(longint'(meanout) == m, "mean");
      check(longint'(varians) == ev, "variance");
      check(longint'(skweness) == es, "skewness (exact at 27 bits)");
    end
    check(n_beyond16 > 0, "skewness beyond 16 bits occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
