// tb_sine_rom -- compares all 64 entries with round(127*sin((i+0.5)*pi/128)).
module tb_sine_rom;
  logic [5:0] addr;
  logic [6:0] amp;
  int checks = 0, failures = 0;

  sine_rom dut (.addr, .amp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int expv;
      expv = int'($floor(127.0 * $sin((real'(i) + 0.5) * 3.14159265358979 / 128.0) + 0.5));
      addr = 6'(i);
      #1;
      checks++;
      if (int'(amp) != expv) begin
        failures++;
        $display("FAIL addr %0d amp %0d expected %0d", i, amp, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
