// tb_phase_modulator -- random phase and phase word; one clock later
// modphase must equal (phase + syncphswd) mod 256. Also checks reset.
module tb_phase_modulator;
  logic       sysclk = 0, resetn = 0;
  logic [7:0] syncphswd, phase, modphase;
  int checks = 0, failures = 0;

  phase_modulator dut (.sysclk, .resetn, .syncphswd, .phase, .modphase);

  always #5 sysclk = ~sysclk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    syncphswd = 8'd200; phase = 8'd100;
    #12;
    checks++;
    if (modphase !== 8'd0) failures++;
    resetn = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge sysclk);
      syncphswd = 8'($urandom);
      phase     = 8'($urandom);
      if (n == 0) begin syncphswd = 8'hFF; phase = 8'h01; end
      expv = (int'(syncphswd) + int'(phase)) % 256;
      @(negedge sysclk);
      checks++;
      if (int'(modphase) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d -> %0d", syncphswd, phase, modphase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
