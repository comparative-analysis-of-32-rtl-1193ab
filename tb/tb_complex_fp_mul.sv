// tb_complex_fp_mul: end-to-end test of the complex multiplier at its default configuration (CIFM mantissa multipliers with carry look ahead adders). Checks the published reference vector bit for bit, hand-worked products, and random complex operands against the composed reference model; counts the mechanisms of the datapath (mantissa normalisation shift, adder carry shift, cancellation shift, alignment shift, operand swap, overflow, underflow, zero, NaN) and fails if one never happened.
module tb_complex_fp_mul;
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

  fp32_t ar, ai, br, bi, pr, pi;
  complex_fp_mul dut (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr), .pi(pi));

  int n_mnorm = 0, n_carry = 0, n_lshift = 0, n_align = 0, n_swap = 0;
  int n_ovf = 0, n_unf = 0, n_zero = 0, n_nan = 0;

  task automatic chk(logic [31:0] er, logic [31:0] ei);
    #1;
    checks += 2;
    if (pr != er) failures++;
    if (pi != ei) failures++;
    if ((pr != er || pi != ei) && failures < 8)
      $display("FAIL (%h,%h)*(%h,%h) = (%h,%h), expected (%h,%h)", ar, ai, br, bi, pr, pi, er, ei);
    if (dut.u_mul_ar_br.norm || dut.u_mul_ai_bi.norm) n_mnorm++;
    if (dut.u_subtractor.sum[24] || dut.u_adder.sum[24]) n_carry++;
    if ((!dut.u_subtractor.sum[24] && dut.u_subtractor.lz > 1) ||
        (!dut.u_adder.sum[24] && dut.u_adder.lz > 1)) n_lshift++;
    if (dut.u_subtractor.d > 0 || dut.u_adder.d > 0) n_align++;
    if (dut.u_subtractor.swap || dut.u_adder.swap) n_swap++;
    if (pr[30:23] == 8'hFF && pr[22:0] == 0) n_ovf++;
    if (iszero(pr) && !iszero(ar) && !iszero(br)) n_unf++;
    if (iszero(pr) && iszero(pi)) n_zero++;
    if (isnan(pr) || isnan(pi)) n_nan++;
  endtask

  function automatic logic [31:0] ref_re(logic [31:0] a_r, a_i, b_r, b_i);
    logic [31:0] t;
    t = ref_mul(a_i, b_i);
    return ref_add(ref_mul(a_r, b_r), {~t[31], t[30:0]});
  endfunction
  function automatic logic [31:0] ref_im(logic [31:0] a_r, a_i, b_r, b_i);
    return ref_add(ref_mul(a_r, b_i), ref_mul(a_i, b_r));
  endfunction

  initial begin
    // published vector: ar = 110.69, ai = 166.46, br = -1.2e14, bi = 1.36e6
    ar = 32'b01000010110111010110001010110010;
    ai = 32'b01000011001001100111010110110110;
    br = 32'b11010110110110100101011101000110;
    bi = 32'b01001001101001011010001110110001;
    chk(32'b11011010001111001101000110000100, 32'b11011010100011011111100011111100);
    // (1 + 2j) * (3 + 4j) = -5 + 10j
    ar = 32'h3F800000; ai = 32'h40000000; br = 32'h40400000; bi = 32'h40800000;
    chk(32'hC0A00000, 32'h41200000);
    // j * j = -1
    ar = 32'h0; ai = 32'h3F800000; br = 32'h0; bi = 32'h3F800000;
    chk(32'hBF800000, 32'h00000000);
    // (2 + 0j) * (0.5 - 0.5j) = 1 - 1j
    ar = 32'h40000000; ai = 32'h0; br = 32'h3F000000; bi = 32'hBF000000;
    chk(32'h3F800000, 32'hBF800000);
    // zero operand
    ar = 32'h3F800000; ai = 32'h0; br = 32'h0; bi = 32'h0;
    chk(32'h0, 32'h0);
    for (int k = 0; k < 20000; k++) begin
      int be;
      be = (k % 7 == 0) ? 200 : ((k % 7 == 1) ? 30 : 127);
      ar = rand_fp(be, 10); ai = rand_fp(be, 10);
      br = rand_fp(be, 10); bi = rand_fp(be, 10);
      if (k % 6 == 0) begin bi = br; ai = ar ^ 32'($urandom_range(15)); end   // pr cancels
      chk(ref_re(ar, ai, br, bi), ref_im(ar, ai, br, bi));
    end
    $display("mant_norm=%0d add_carry=%0d lshift=%0d align_shift=%0d swap=%0d",
             n_mnorm, n_carry, n_lshift, n_align, n_swap);
    $display("overflow=%0d underflow=%0d zero=%0d nan=%0d", n_ovf, n_unf, n_zero, n_nan);
    checks++;
    if (n_mnorm == 0 || n_carry == 0 || n_lshift == 0 || n_align == 0 || n_swap == 0 ||
        n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_nan == 0)
      failures++;
    finish();
  end
endmodule
