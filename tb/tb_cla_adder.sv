// tb_cla_adder: random and corner-case check of the 24-bit carry look ahead adder against '+', plus exhaustive checks of a 6-bit instance (a width that is not a multiple of four).
module tb_cla_adder;
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

  logic [23:0] a, b, s;
  logic cin, cout;
  cla_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  logic [5:0] a6, b6, s6;
  logic cin6, cout6;
  cla_adder #(.W(6)) dut6 (.a(a6), .b(b6), .cin(cin6), .s(s6), .cout(cout6));

  task automatic chk24();
    #1;
    checks++;
    if ({cout, s} != 25'(a) + 25'(b) + 25'(cin)) begin
      failures++;
      if (failures < 5) $display("FAIL %h+%h+%b = %b%h", a, b, cin, cout, s);
    end
  endtask

  initial begin
    // full carry propagation and single-bit generates
    a = '1; b = '0; cin = 1'b1; chk24();
    a = '1; b = '1; cin = 1'b1; chk24();
    for (int i = 0; i < 24; i++) begin
      a = 24'(1) << i; b = ~24'(0) << i; cin = 1'b0; chk24();
      a = ~(24'(1) << i); b = 24'(1); cin = 1'b1; chk24();
    end
    for (int k = 0; k < 50000; k++) begin
      a = 24'($urandom); b = 24'($urandom); cin = 1'($urandom);
      if (k % 4 == 0) b = ~a ^ (24'(1) << $urandom_range(23));  // long propagate runs
      chk24();
    end
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 64; j++) begin
        {cin6, a6} = 7'(i); b6 = 6'(j);
        #1;
        checks++;
        if ({cout6, s6} != 7'(a6) + 7'(b6) + 7'(cin6)) failures++;
      end
    end
    finish();
  end
endmodule
