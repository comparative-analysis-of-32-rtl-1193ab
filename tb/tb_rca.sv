// tb_rca: exhaustive check of the 8-bit ripple carry adder (with carry-in) against '+', and a random check of a 13-bit instance.
module tb_rca;
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

  logic [7:0] a, b, s;
  logic cin, cout;
  rca dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  logic [12:0] a2, b2, s2;
  logic cin2, cout2;
  rca #(.W(13)) dut13 (.a(a2), .b(b2), .cin(cin2), .s(s2), .cout(cout2));

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        {cin, a} = 9'(i); b = 8'(j);
        #1;
        checks++;
        if ({cout, s} != 9'(a) + 9'(b) + 9'(cin)) begin
          failures++;
          if (failures < 5) $display("FAIL %h+%h+%b = %b%h", a, b, cin, cout, s);
        end
      end
    end
    for (int k = 0; k < 5000; k++) begin
      a2 = 13'($urandom); b2 = 13'($urandom); cin2 = 1'($urandom);
      #1;
      checks++;
      if ({cout2, s2} != 14'(a2) + 14'(b2) + 14'(cin2)) failures++;
    end
    finish();
  end
endmodule
