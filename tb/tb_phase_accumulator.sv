// tb_phase_accumulator -- drives syncfreq the way load_freq_word does (byte k
// of a new word k cycles after byte 0) and compares the 8-bit phase with the
// top byte of a plain 32-bit accumulator delayed by three cycles. Checks the
// SIN/COS square waves, and the output frequency: with word 2^32/32 the phase
// MSB must fall exactly once every 32 cycles.
module tb_phase_accumulator;
  logic        sysclk = 0, resetn = 0;
  logic [31:0] syncfreq;
  logic [7:0]  phase;
  logic        sin_o, cos_o;
  int checks = 0, failures = 0;

  phase_accumulator dut (.sysclk, .resetn, .syncfreq, .phase, .sin_o, .cos_o);

  always #5 sysclk = ~sysclk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] acc_hist [0:8191];   // plain accumulator after each edge
  logic [31:0] fvirt;               // word the plain accumulator adds
  logic [31:0] pend [4];            // staggered bytes still to be applied
  int          pend_age = 99;
  int          n = 0;

  task automatic new_word(input logic [31:0] w);
    // byte 0 is applied at the next negedge, byte k k cycles later
    pend[0] = w;
    pend_age = 0;
  endtask

  initial begin
    logic [31:0] words [6];
    int rises;
    logic last_sin;
    words = '{32'h0100_0000, 32'h07FF_FFFF, 32'hFFFF_FFFF, 32'h0000_0101,
               32'h1357_9BDF, 32'h0800_0000};
    syncfreq = '0;
    fvirt = '0;
    acc_hist[0] = '0;
    #12 resetn = 1;
    for (int w = 0; w < 6; w++) begin
      new_word(words[w]);
      repeat (700) begin
        @(negedge sysclk);
        // staggered application of the new word
        if (pend_age < 4) begin
          syncfreq[pend_age*8 +: 8] = pend[0][pend_age*8 +: 8];
          if (pend_age == 0) fvirt = pend[0];
          pend_age++;
        end
        @(posedge sysclk);
        n++;
        acc_hist[n] = acc_hist[n-1] + fvirt;
        #1;
        checks++;
        if (phase !== ((n >= 3) ? acc_hist[n-3][31:24] : 8'h00)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d phase %h expected %h", n, phase, acc_hist[n-3][31:24]);
        end
        checks++;
        if (sin_o !== ~phase[7] || cos_o !== (phase[7] == phase[6])) failures++;
      end
    end
    // rate: word 2^32/32 is in use now; count falling edges of the MSB
    rises = 0;
    last_sin = sin_o;
    repeat (320) begin
      @(posedge sysclk); #1;
      if (sin_o && !last_sin) rises++;
      last_sin = sin_o;
    end
    checks++;
    if (rises != 10) begin failures++; $display("FAIL rate: %0d periods in 320 cycles", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
