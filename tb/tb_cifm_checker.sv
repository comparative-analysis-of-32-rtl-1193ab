// tb_cifm_checker: exhaustive check of the CIFM operand checker (en = operand half is non-zero).
module tb_cifm_checker;
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

  logic [11:0] x;
  logic en;
  cifm_checker dut (.x(x), .en(en));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      x = 12'(i);
      #1;
      checks++;
      if (en != (i != 0)) begin
        failures++;
        $display("FAIL x=%h en=%b", x, en);
      end
    end
    finish();
  end
endmodule
