// tb_load_phase_word -- writes random phase words with a strobe that is not
// aligned to sysclk. With e0 the first sysclk edge after the strobe's rising
// edge, syncphswd must keep the old word through edge e1 and show the new
// one from edge e2 on, unaffected by PHASEWORD changing after the strobe.
module tb_load_phase_word;
  logic       sysclk = 0, resetn = 0;
  logic [7:0] phaseword, syncphswd;
  logic       pwwrn_n = 1;
  int checks = 0, failures = 0;

  load_phase_word dut (.sysclk, .resetn, .phaseword, .pwwrn_n, .syncphswd);

  always #5 sysclk = ~sysclk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] oldw, neww;
    phaseword = 8'h55;
    #2 pwwrn_n = 0; #3 pwwrn_n = 1;
    #10;
    checks++;
    if (syncphswd !== '0) failures++;
    @(negedge sysclk); resetn = 1;
    oldw = '0;
    for (int w = 0; w < 60; w++) begin
      neww = 8'($urandom);
      if (neww == oldw) neww = ~oldw;
      @(posedge sysclk);
      #(1 + (w % 7));
      phaseword = neww;
      pwwrn_n   = 0;
      #(11.3 + (w % 6));
      pwwrn_n   = 1;
      #0.5 phaseword = ~neww;
      for (int e = 1; e <= 6; e++) begin
        @(posedge sysclk); #1;
        checks++;
        if (syncphswd !== ((e >= 3) ? neww : oldw)) begin
          failures++;
          $display("FAIL write %0d edge e%0d: %h", w, e - 1, syncphswd);
        end
      end
      oldw = neww;
    end
    resetn = 0; #1;
    checks++;
    if (syncphswd !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
