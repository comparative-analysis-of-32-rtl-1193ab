// tb_vedic_mul8: exhaustive check of the 8x8 Vedic multiplier against '*'.
module tb_vedic_mul8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic [7:0]  a, b;
  logic [15:0] s;
  vedic_mul8 dut (.a(a), .b(b), .s(s));

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (s != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d*%0d = %0d", a, b, s);
      end
    end
    finish();
  end
endmodule
