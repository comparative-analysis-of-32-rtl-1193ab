// tb_fp_mul: checks the 32-bit floating-point multiplier against the integer reference model: hand-worked products, random operands with close and far exponents, zeros, infinities, NaNs, overflow and underflow. Counts how often each case occurred and fails if one never did.
module tb_fp_mul;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  fp32_t a, b, p;
  fp_mul dut (.a(a), .b(b), .p(p));

  int n_norm = 0, n_nonorm = 0, n_ovf = 0, n_unf = 0, n_zero = 0, n_nan = 0, n_inf = 0;

  task automatic chk(logic [31:0] expv);
    #1;
    checks++;
    if (p != expv) begin
      failures++;
      if (failures < 8) $display("FAIL %h * %h = %h, expected %h", a, b, p, expv);
    end
  endtask

  task automatic count();
    if (isnan(a) || isnan(b)) n_nan++;
    else if (isinf(a) || isinf(b)) begin if (iszero(a) || iszero(b)) n_nan++; else n_inf++; end
    else if (iszero(a) || iszero(b)) n_zero++;
    else begin
      if (dut.norm) n_norm++; else n_nonorm++;
      if (dut.e >= 255) n_ovf++;
      if (dut.e <= 0) n_unf++;
    end
  endtask

  initial begin
    // worked by hand: 2*3 = 6, 1.5*1.5 = 2.25, -0.5*4 = -2, 1*1 = 1
    a = 32'h40000000; b = 32'h40400000; chk(32'h40C00000); count();
    a = 32'h3FC00000; b = 32'h3FC00000; chk(32'h40100000); count();
    a = 32'hBF000000; b = 32'h40800000; chk(32'hC0000000); count();
    a = 32'h3F800000; b = 32'h3F800000; chk(32'h3F800000); count();
    // specials
    a = 32'h7F800000; b = 32'h00000000; chk(32'h7FC00000); count();
    a = 32'hFF800000; b = 32'h40000000; chk(32'hFF800000); count();
    a = 32'h7F000000; b = 32'h7F000000; chk(32'h7F800000); count();   // overflow
    a = 32'h00800000; b = 32'h00800000; chk(32'h00000000); count();   // underflow
    a = 32'h80000000; b = 32'h40000000; chk(32'h80000000); count();   // -0 * 2
    a = 32'h7FC00001; b = 32'h3F800000; chk(32'h7FC00000); count();
    for (int k = 0; k < 40000; k++) begin
      a = rand_fp(127, 20);
      b = rand_fp((k % 3 == 0) ? 200 : 127, 40);
      chk(ref_mul(a, b));
      count();
    end
    $display("norm=%0d no_norm=%0d overflow=%0d underflow=%0d zero=%0d nan=%0d inf=%0d",
             n_norm, n_nonorm, n_ovf, n_unf, n_zero, n_nan, n_inf);
    checks++;
    if (n_norm == 0 || n_nonorm == 0 || n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_nan == 0 || n_inf == 0)
      failures++;
    finish();
  end
endmodule
