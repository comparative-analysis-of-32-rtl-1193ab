// tb_mant_mul24: check of the mantissa multiplier in all four styles (Vedic, array, CIFM, CIFM with carry look ahead) against '*'.
module tb_mant_mul24;
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

  import fp32_pkg::*;
  logic [23:0] a, b;
  logic [47:0] p [4];
  mant_mul24 dut (.a(a), .b(b), .p(p[3]));
  mant_mul24 #(.MULT(MULT_VEDIC)) dut_v (.a(a), .b(b), .p(p[0]));
  mant_mul24 #(.MULT(MULT_ARRAY)) dut_a (.a(a), .b(b), .p(p[1]));
  mant_mul24 #(.MULT(MULT_CIFM))  dut_c (.a(a), .b(b), .p(p[2]));

  initial begin
    for (int k = 0; k < 20000; k++) begin
      a = 24'($urandom); b = 24'($urandom);
      if (k == 0) begin a = '1; b = '1; end
      if (k % 2 == 0) begin a[23] = 1'b1; b[23] = 1'b1; end  // normalised mantissas
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (p[s] != 48'(a) * 48'(b)) begin
          failures++;
          if (failures < 5) $display("FAIL style %0d: %h*%h = %h", s, a, b, p[s]);
        end
      end
    end
    finish();
  end
endmodule
