// tb_cla_adder -- exhaustive check of the 8-bit carry-lookahead adder.
// Every a, b and cin is applied and {cout, sum} compared with a + b + cin.
module tb_cla_adder;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); cin = 1'(ci);
          #1;
          checks++;
          if ({cout, sum} !== 9'(i + j + ci)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d -> %0d", i, j, ci, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
