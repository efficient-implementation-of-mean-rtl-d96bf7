// Self-checking testbench of skewness_unit: the reference image case
// (E[i^3]=19770, E[i^2]=446, mean=14 gives 6526), then random images whose
// truncated moments the testbench forms; the expected value
// E3 - 3*mean*E2 + 2*mean^3 is computed in 64-bit integers and compared
// with the output both at the default 16 bits (low bits, two's complement)
// and in a 27-bit instance that holds every value exactly. Skewed-left,
// skewed-right and symmetric images are all counted.
module tb_skewness_unit;
  logic [7:0]  mean;
  logic [15:0] e2;
  logic [23:0] e3;
  logic signed [15:0] skew16;
  logic signed [26:0] skew27;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0;

  skewness_unit #(.MEAN_W(8), .E2_W(16), .E3_W(24), .SKEW_W(16)) dut16 (
    .mean, .e2, .e3, .skewness(skew16));
  skewness_unit #(.MEAN_W(8), .E2_W(16), .E3_W(24), .SKEW_W(27)) dut27 (
    .mean, .e2, .e3, .skewness(skew27));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint m, input longint q2, input longint q3);
    longint expv = q3 - 3 * m * q2 + 2 * m * m * m;
    mean = 8'(m); e2 = 16'(q2); e3 = 24'(q3);
    #1;
    checks += 2;
    if (longint'(skew27) != expv) begin
      failures++;
      $display("FAIL 27-bit m=%0d e2=%0d e3=%0d skew=%0d expected=%0d", m, q2, q3, skew27, expv);
    end
    if (skew16 != 16'(expv)) begin
      failures++;
      $display("FAIL 16-bit m=%0d e2=%0d e3=%0d skew=%0d expected=%0d", m, q2, q3, skew16, 16'(expv));
    end
    if (expv < 0) n_neg++;
    if (expv > 0) n_pos++;
  endtask

  initial begin
    check(14, 446, 19770);
    for (int t = 0; t < 600; t++) begin
      longint s1, s2, s3, p;
      int base;
      s1 = 0; s2 = 0; s3 = 0;
      base = int'($urandom % 256);
      for (int k = 0; k < 64; k++) begin
        p = longint'($urandom % 256);
        case (t % 3)
          0: p = (k < 56) ? base : p;                   // one mode, outliers
          1: p = (k < 8) ? 255 - (p % 64) : p % 64;     // skewed right
          default: p = (k < 8) ? p % 64 : 255 - (p % 64); // skewed left
        endcase
        s1 += p; s2 += p * p; s3 += p * p * p;
      end
      check(s1 / 64, s2 / 64, s3 / 64);
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL sign coverage neg=%0d pos=%0d", n_neg, n_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
