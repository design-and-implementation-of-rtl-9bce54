// tb_load_freq_word -- writes random tuning words with a strobe that is not
// aligned to sysclk and changes FREQWORD right after the strobe's rising
// edge. Taking e0 as the first sysclk edge after the rising edge, byte k of
// syncfreq must hold the old word up to edge e1+k and the new word from edge
// e2+k on. Also checks that reset clears the word.
module tb_load_freq_word;
  logic        sysclk = 0, resetn = 0;
  logic [31:0] freqword, syncfreq;
  logic        fwwrn_n = 1;
  int checks = 0, failures = 0;
  int cycle = 0;

  load_freq_word dut (.sysclk, .resetn, .freqword, .fwwrn_n, .syncfreq);

  always #5 sysclk = ~sysclk;
  always @(posedge sysclk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] oldw, neww;
    int c_rise;
    freqword = 32'hDEADBEEF;
    #2 fwwrn_n = 0; #3 fwwrn_n = 1;   // a strobe during reset is ignored
    #10;
    checks++;
    if (syncfreq !== '0) failures++;
    @(negedge sysclk); resetn = 1;
    oldw = '0;
    for (int w = 0; w < 40; w++) begin
      neww = $urandom;
      if (w == 0) neww = 32'h80FF01A5;
      @(posedge sysclk);
      #(1 + (w % 7));
      freqword = neww;
      fwwrn_n  = 0;
      #(11.3 + (w % 5));
      fwwrn_n  = 1;
      c_rise   = cycle;
      #0.5 freqword = ~neww;          // must not reach syncfreq
      for (int e = 1; e <= 8; e++) begin
        @(posedge sysclk); #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (syncfreq[k*8 +: 8] !== ((e >= 3 + k) ? neww[k*8 +: 8] : oldw[k*8 +: 8])) begin
            failures++;
            $display("FAIL write %0d edge e%0d byte %0d: %h", w, e - 1, k, syncfreq);
          end
        end
      end
      oldw = neww;
    end
    resetn = 0; #1;
    checks++;
    if (syncfreq !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
