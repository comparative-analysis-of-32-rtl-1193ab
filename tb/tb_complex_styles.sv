// tb_complex_styles: runs the complex multiplier built with each of the four mantissa
// multiplier styles (Vedic, array, CIFM with ripple adders, CIFM with carry look ahead) side
// by side on the published reference vector and on random complex operands. All four must
// give the bit-identical result of the reference model: the styles differ only in delay and
// power, not in function.
module tb_complex_styles;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t ar, ai, br, bi;
  fp32_t pr [4], pi [4];
  complex_fp_mul #(.MULT(MULT_VEDIC))    u_vedic (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr[0]), .pi(pi[0]));
  complex_fp_mul #(.MULT(MULT_ARRAY))    u_array (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr[1]), .pi(pi[1]));
  complex_fp_mul #(.MULT(MULT_CIFM))     u_cifm  (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr[2]), .pi(pi[2]));
  complex_fp_mul #(.MULT(MULT_CIFM_CLA)) u_cla   (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr[3]), .pi(pi[3]));

  task automatic chk();
    logic [31:0] t, er, ei;
    t  = ref_mul(ai, bi);
    er = ref_add(ref_mul(ar, br), {~t[31], t[30:0]});
    ei = ref_add(ref_mul(ar, bi), ref_mul(ai, br));
    #1;
    for (int s = 0; s < 4; s++) begin
      checks += 2;
      if (pr[s] != er) failures++;
      if (pi[s] != ei) failures++;
      if ((pr[s] != er || pi[s] != ei) && failures < 8)
        $display("FAIL style %0d: (%h,%h)*(%h,%h) = (%h,%h), expected (%h,%h)",
                 s, ar, ai, br, bi, pr[s], pi[s], er, ei);
    end
  endtask

  initial begin
    ar = 32'h42DD62B2; ai = 32'h432675B6; br = 32'hD6DA5746; bi = 32'h49A5A3B1;
    chk();
    checks++;
    if (pr[3] != 32'hDA3CD184 || pi[3] != 32'hDA8DF8FC) failures++;
    for (int k = 0; k < 5000; k++) begin
      ar = rand_fp(127, 30); ai = rand_fp(127, 30);
      br = rand_fp(127, 30); bi = rand_fp(127, 30);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
