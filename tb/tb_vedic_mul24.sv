// tb_vedic_mul24: check of the 24x24 Vedic multiplier against '*' with random and corner operands.
module tb_vedic_mul24;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic [23:0] a, b;
  logic [47:0] s;
  vedic_mul24 dut (.a(a), .b(b), .s(s));

  task automatic chk();
    #1;
    checks++;
    if (s != 48'(a) * 48'(b)) begin
      failures++;
      if (failures < 5) $display("FAIL %h*%h = %h", a, b, s);
    end
  endtask

  initial begin
    a = '1; b = '1; chk();
    a = 24'hFF00FF; b = 24'h00FF00; chk();
    for (int k = 0; k < 30000; k++) begin
      a = 24'($urandom); b = 24'($urandom);
      chk();
    end
    finish();
  end
endmodule
