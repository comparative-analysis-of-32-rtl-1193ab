// tb_fp_addsub: checks the floating-point adder/subtractor against the integer reference model (truncation): hand-worked sums, random operands with equal, close and far exponents in both modes, cancellation, zeros, infinities and NaNs. Counts the mechanisms (operand swap, carry-out right shift, leading-zero left shift,
// bits lost in alignment, exact cancellation, overflow, underflow) and fails if one never happened.
module tb_fp_addsub;
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

  fp32_t a, b, y;
  logic  sub;
  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  int n_swap = 0, n_carry = 0, n_lshift = 0, n_lost = 0, n_cancel = 0, n_ovf = 0, n_unf = 0;

  task automatic chk(logic [31:0] expv);
    #1;
    checks++;
    if (y != expv) begin
      failures++;
      if (failures < 8) $display("FAIL %h %s %h = %h, expected %h", a, sub ? "-" : "+", b, y, expv);
    end
    if (!(isnan(a) || isnan(b) || isinf(a) || isinf(b))) begin
      if (dut.swap) n_swap++;
      if (dut.sum[24]) n_carry++;
      if (!dut.sum[24] && dut.lz > 1) n_lshift++;
      if (dut.d != 0 && dut.d < 24 && (dut.ms & ((24'd1 << dut.d) - 1)) != 0) n_lost++;
      if (dut.sum == 0) n_cancel++;
      if (dut.sum != 0 && dut.e >= 255) n_ovf++;
      if (dut.sum != 0 && dut.e <= 0) n_unf++;
    end
  endtask

  initial begin
    sub = 1'b0;
    a = 32'h3F800000; b = 32'h3F800000; chk(32'h40000000);   // 1 + 1 = 2
    a = 32'h40400000; b = 32'hBF800000; chk(32'h40000000);   // 3 + -1 = 2
    a = 32'h3F800000; b = 32'h40000000; chk(32'h40400000);   // 1 + 2 = 3 (swap)
    a = 32'h7F7FFFFF; b = 32'h7F7FFFFF; chk(32'h7F800000);   // overflow
    a = 32'h7F800000; b = 32'h3F800000; chk(32'h7F800000);
    sub = 1'b1;
    a = 32'h3F800000; b = 32'h3F800000; chk(32'h00000000);   // 1 - 1 = +0
    a = 32'h3F800000; b = 32'h33800000; chk(32'h3F800000);   // 1 - 2^-24: aligned operand vanishes
    a = 32'h3F800000; b = 32'h3F000001; chk(32'h3F000000);   // 1 - (0.5 + 2^-24): lost bit
    a = 32'h00C00000; b = 32'h00800000; chk(32'h00000000);   // result below the normal range
    a = 32'h7F800000; b = 32'h7F800000; chk(32'h7FC00000);   // inf - inf
    a = 32'h40A00000; b = 32'h40400000; chk(32'h40000000);   // 5 - 3 = 2
    for (int k = 0; k < 60000; k++) begin
      int be;
      sub = 1'($urandom);
      be  = 1 + $urandom_range(253);
      a = rand_fp(be, 2);
      b = rand_fp(be, (k % 4 == 0) ? 40 : 3);
      if (k % 5 == 0) b[30:0] = a[30:0] ^ 31'($urandom_range(255));   // heavy cancellation
      chk(ref_add(a, {b[31] ^ sub, b[30:0]}));
    end
    $display("swap=%0d carry=%0d lshift=%0d lost_bits=%0d cancel=%0d overflow=%0d underflow=%0d",
             n_swap, n_carry, n_lshift, n_lost, n_cancel, n_ovf, n_unf);
    checks++;
    if (n_swap == 0 || n_carry == 0 || n_lshift == 0 || n_lost == 0 || n_cancel == 0 || n_ovf == 0 || n_unf == 0)
      failures++;
    finish();
  end
endmodule
