// Self-checking testbench of shift_right_register: checks that a load
// captures floor(d / 64), that the value is held while load is low, and that
// reset clears it.
module tb_shift_right_register;
  localparam int unsigned IN_W = 30, SHIFT = 6;
  logic clk = 1'b0;
  logic reset, load;
  logic [IN_W-1:0]       d;
  logic [IN_W-SHIFT-1:0] q;
  int checks = 0, failures = 0;
  longint held;

  shift_right_register #(.IN_W(IN_W), .SHIFT(SHIFT)) dut (.clk, .reset, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = 1'b0; d = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset value %0d", q); end
    held = 0;
    for (int i = 0; i < 300; i++) begin
      d    = IN_W'($urandom);
      load = ($urandom % 3 == 0);
      @(posedge clk); #1;
      if (load) held = longint'(d) / 64;
      checks++;
      if (longint'(q) != held) begin
        failures++;
        $display("FAIL i=%0d q=%0d expected=%0d", i, q, held);
      end
    end
    reset = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q != 0) begin failures++; $display("FAIL reset clear %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
