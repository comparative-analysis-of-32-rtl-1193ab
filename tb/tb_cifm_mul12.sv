// tb_cifm_mul12: check of the 12x12 CIFM module, with carry look ahead and with ripple adders, against '*': random and corner operands, and that en = 0 gives 0.
module tb_cifm_mul12;
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

  logic        en;
  logic [11:0] a, b;
  logic [23:0] p, p_rca;
  cifm_mul12 dut (.en(en), .a(a), .b(b), .p(p));
  cifm_mul12 #(.USE_CLA(1'b0)) dut_rca (.en(en), .a(a), .b(b), .p(p_rca));

  task automatic chk();
    logic [23:0] exp_p;
    #1;
    exp_p = en ? 24'(a) * 24'(b) : 24'd0;
    checks += 2;
    if (p != exp_p)     failures++;
    if (p_rca != exp_p) failures++;
    if ((p != exp_p || p_rca != exp_p) && failures < 6)
      $display("FAIL en=%b %h*%h = %h / %h, expected %h", en, a, b, p, p_rca, exp_p);
  endtask

  initial begin
    en = 1'b1;
    a = '1; b = '1; chk();
    a = '0; b = '1; chk();
    for (int k = 0; k < 40000; k++) begin
      a = 12'($urandom); b = 12'($urandom);
      chk();
    end
    en = 1'b0;
    for (int k = 0; k < 100; k++) begin
      a = 12'($urandom); b = 12'($urandom);
      chk();
    end
    finish();
  end
endmodule
