// tb_sine_lookup -- every 8-bit phase p is applied; one clock later dacout,
// read as a signed number, must equal round(127*|sin(x)|) for sin(x) > 0 and
// -round(127*|sin(x)|)-1 otherwise, x = (p+0.5)*2*pi/256. Also checks reset.
module tb_sine_lookup;
  logic       sysclk = 0, resetn = 0;
  logic [7:0] modphase, dacout;
  int checks = 0, failures = 0;

  sine_lookup dut (.sysclk, .resetn, .modphase, .dacout);

  always #5 sysclk = ~sysclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int p);
    real s;
    int  m;
    s = $sin((real'(p) + 0.5) * 2.0 * 3.14159265358979 / 256.0);
    m = int'($floor(127.0 * (s < 0 ? -s : s) + 0.5));
    return (s > 0) ? m : -m - 1;
  endfunction

  initial begin
    modphase = 8'd77;
    #12;
    checks++;
    if (dacout !== 8'd0) failures++;
    resetn = 1;
    for (int p = 0; p < 256; p++) begin
      @(negedge sysclk);
      modphase = 8'(p);
      @(negedge sysclk);
      checks++;
      if (int'($signed(dacout)) != expected(p)) begin
        failures++;
        $display("FAIL phase %0d dacout %0d expected %0d", p, $signed(dacout), expected(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
