// Self-checking testbench of frame_counter: checks that the count runs
// 0..N-1 and wraps, that `last` is high exactly at N-1, and that reset
// returns the count to zero even in the middle of an image.
module tb_frame_counter;
  localparam int unsigned N = 64;
  logic clk = 1'b0;
  logic reset;
  logic [$clog2(N)-1:0] count;
  logic last;
  int checks = 0, failures = 0;

  frame_counter #(.N_PIXELS(N)) dut (.clk, .reset, .count, .last);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (count=%0d last=%0b)", what, count, last);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_cnt;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    expect_cnt = 0;
    for (int i = 0; i < 3 * N + 17; i++) begin
      check(count == expect_cnt, "count sequence");
      check(last == (expect_cnt == N - 1), "last flag");
      @(posedge clk); #1;
      expect_cnt = (expect_cnt + 1) % N;
    end
    reset = 1'b1;
    @(posedge clk); #1;
    check(count == 0, "reset mid-image");
    reset = 1'b0;
    @(posedge clk); #1;
    check(count == 1, "count after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
