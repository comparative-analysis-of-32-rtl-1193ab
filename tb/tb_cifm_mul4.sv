// tb_cifm_mul4: exhaustive check of the 4x4 CIFM multiplier against '*'.
module tb_cifm_mul4;
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

  logic [3:0] x, y;
  logic [7:0] p;
  cifm_mul4 dut (.x(x), .y(y), .p(p));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {x, y} = 8'(i);
      #1;
      checks++;
      if (p != 8'(x) * 8'(y)) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", x, y, p);
      end
    end
    finish();
  end
endmodule
