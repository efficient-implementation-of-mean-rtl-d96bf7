// Self-checking testbench of variance_unit: the reference image case
// (E[i^2]=446, mean=14 gives 250), then random images of 64 pixels whose
// truncated moments are formed by the testbench, compared with
// floor(S2/64) - floor(S1/64)^2.
module tb_variance_unit;
  logic [7:0]  mean;
  logic [15:0] e2;
  logic [15:0] variance;
  int checks = 0, failures = 0;

  variance_unit #(.MEAN_W(8), .E2_W(16), .VAR_W(16)) dut (.mean, .e2, .variance);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint m, input longint q2);
    mean = 8'(m); e2 = 16'(q2);
    #1;
    checks++;
    if (longint'(variance) != q2 - m * m) begin
      failures++;
      $display("FAIL mean=%0d e2=%0d variance=%0d expected=%0d", m, q2, variance, q2 - m * m);
    end
  endtask

  initial begin
    check(14, 446);
    check(255, 65025);
    check(127, 32512);
    for (int t = 0; t < 500; t++) begin
      longint s1, s2, p;
      int spread;
      s1 = 0; s2 = 0;
      spread = 1 + int'($urandom % 256);
      for (int k = 0; k < 64; k++) begin
        p = longint'($urandom % spread);
        if (t % 7 == 0) p = (k % 2 == 0) ? 0 : 255;  // largest contrast
        s1 += p; s2 += p * p;
      end
      check(s1 / 64, s2 / 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
