// Self-checking testbench of power_unit: all 256 grey levels, compared with
// the square and cube computed by the testbench in 64-bit integers.
module tb_power_unit;
  localparam int unsigned PIX_W = 8;
  logic [PIX_W-1:0]   pix;
  logic [2*PIX_W-1:0] pix_sq;
  logic [3*PIX_W-1:0] pix_cube;
  int checks = 0, failures = 0;

  power_unit #(.PIX_W(PIX_W)) dut (.pix, .pix_sq, .pix_cube);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int i = 0; i < (1 << PIX_W); i++) begin
      pix = PIX_W'(i);
      #1;
      v = longint'(i);
      checks += 2;
      if (longint'(pix_sq) != v * v) begin
        failures++;
        $display("FAIL square of %0d: %0d", i, pix_sq);
      end
      if (longint'(pix_cube) != v * v * v) begin
        failures++;
        $display("FAIL cube of %0d: %0d", i, pix_cube);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
