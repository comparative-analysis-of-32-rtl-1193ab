// tb_array_mul: check of the 24x24 array multiplier against '*' (random and corner operands, including the 13 x 11 example), and an exhaustive check of a 4x4 instance.
module tb_array_mul;
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

  logic [23:0] m, q;
  logic [47:0] p;
  array_mul dut (.m(m), .q(q), .p(p));

  logic [3:0] m4, q4;
  logic [7:0] p4;
  array_mul #(.N(4)) dut4 (.m(m4), .q(q4), .p(p4));

  task automatic chk();
    #1;
    checks++;
    if (p != 48'(m) * 48'(q)) begin
      failures++;
      if (failures < 5) $display("FAIL %h*%h = %h", m, q, p);
    end
  endtask

  initial begin
    m = 24'd13; q = 24'd11; chk();     // 143
    m = '1; q = '1; chk();
    m = '1; q = 24'd1; chk();
    for (int k = 0; k < 30000; k++) begin
      m = 24'($urandom); q = 24'($urandom);
      chk();
    end
    for (int i = 0; i < 256; i++) begin
      {m4, q4} = 8'(i);
      #1;
      checks++;
      if (p4 != 8'(m4) * 8'(q4)) failures++;
    end
    m4 = 4'd13; q4 = 4'd11; #1;
    checks++;
    if (p4 != 8'd143) failures++;
    finish();
  end
endmodule
