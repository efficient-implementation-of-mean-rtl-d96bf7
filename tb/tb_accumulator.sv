// Self-checking testbench of accumulator: random terms, restart every
// 64 terms and once at an irregular point, reset in the middle of a run.
// `total` is compared every clock with a running sum kept by the testbench.
module tb_accumulator;
  localparam int unsigned IN_W = 24, ACC_W = 30;
  logic clk = 1'b0;
  logic reset, restart;
  logic [IN_W-1:0]  term;
  logic [ACC_W-1:0] total;
  int checks = 0, failures = 0;
  longint model;

  accumulator #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.clk, .reset, .restart, .term, .total);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; restart = 1'b0; term = '0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    model = 0;
    for (int i = 0; i < 400; i++) begin
      term    = IN_W'($urandom);
      if (i % 5 == 0) term = '1;               // largest term
      restart = (i % 64 == 63) || (i == 100);
      if (i == 300) reset = 1'b1;
      #1;
      checks++;
      if (longint'(total) != model + longint'(term)) begin
        failures++;
        $display("FAIL i=%0d total=%0d expected=%0d", i, total, model + longint'(term));
      end
      @(posedge clk);
      model = (restart || reset) ? 0 : model + longint'(term);
      #1 reset = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
