// tb_array_cell: exhaustive check of the array multiplier cell: {cout, pp_out} = (m & q) + pp_in + cin.
module tb_array_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // watchdog
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  logic m, q, pp_in, cin, pp_out, cout;
  array_cell dut (.m(m), .q(q), .pp_in(pp_in), .cin(cin), .pp_out(pp_out), .cout(cout));

  initial begin
    for (int i = 0; i < 16; i++) begin
      {m, q, pp_in, cin} = 4'(i);
      #1;
      checks++;
      if ({cout, pp_out} != 2'(m & q) + 2'(pp_in) + 2'(cin)) begin
        failures++;
        $display("FAIL m=%b q=%b pp=%b cin=%b -> %b%b", m, q, pp_in, cin, cout, pp_out);
      end
    end
    finish();
  end
endmodule
