// tb_vedic_mul4: exhaustive check of the 4x4 Vedic multiplier against '*'.
module tb_vedic_mul4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic [3:0] a, b;
  logic [7:0] s;
  vedic_mul4 dut (.a(a), .b(b), .s(s));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (s != 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", a, b, s);
      end
    end
    finish();
  end
endmodule
