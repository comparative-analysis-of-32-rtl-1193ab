// tb_cifm_mul24: check of the 24x24 CIFM multiplier, with carry look ahead and with ripple adders, against '*': random operands, all-ones, and operands with zero high halves so that the checkers switch modules off.
module tb_cifm_mul24;
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
  logic [47:0] p, p_rca;
  cifm_mul24 dut (.a(a), .b(b), .p(p));
  cifm_mul24 #(.USE_CLA(1'b0)) dut_rca (.a(a), .b(b), .p(p_rca));

  task automatic chk();
    logic [47:0] exp_p;
    #1;
    exp_p = 48'(a) * 48'(b);
    checks += 2;
    if (p != exp_p)     failures++;
    if (p_rca != exp_p) failures++;
    if ((p != exp_p || p_rca != exp_p) && failures < 6)
      $display("FAIL %h*%h = %h / %h, expected %h", a, b, p, p_rca, exp_p);
  endtask

  initial begin
    a = '1; b = '1; chk();
    a = 24'h000FFF; b = 24'hFFFFFF; chk();
    a = 24'hFFFFFF; b = 24'h000FFF; chk();
    for (int k = 0; k < 30000; k++) begin
      a = 24'($urandom); b = 24'($urandom);
      case (k % 8)
        0: a[23:12] = '0;
        1: b[23:12] = '0;
        2: begin a[23:12] = '0; b[23:12] = '0; end
        3: a[11:0] = '1;
        default: ;
      endcase
      chk();
    end
    finish();
  end
endmodule
