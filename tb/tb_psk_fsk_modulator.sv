// tb_psk_fsk_modulator -- drives data bits and mode changes and captures the
// words on the rising edges of the write strobes, as the NCO does. After
// every change the captured tuning and phase words must follow the FSK/PSK
// mapping (FSK: 0 -> freqword0, 1 -> freqword1, phase 0; PSK: freqword0,
// 1 -> 0, 0 -> 0x80). Also checks that each strobe falls three clocks after a
// data change, stays low for STROBE_LOW clocks, that writes are at least
// WRITE_GAP clocks apart and that an unchanged word is not rewritten.
module tb_psk_fsk_modulator;
  import dds_pkg::*;
  logic        sysclk = 0, resetn = 0;
  mod_mode_e   mode = MOD_FSK;
  logic        data = 0;
  logic [31:0] freqword0 = 32'h1111_1111, freqword1 = 32'h2222_2222;
  logic [31:0] freqword;
  logic [7:0]  phaseword;
  logic        fwwrn_n, pwwrn_n;
  int checks = 0, failures = 0;

  psk_fsk_modulator dut (.*);

  always #5 sysclk = ~sysclk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // NCO side: capture on rising strobe edges, measure strobe timing
  logic [31:0] cap_f = '0;
  logic [7:0]  cap_p = '0;
  int          nf = 0, np = 0;
  int          cyc = 0, f_fall = -100, p_fall = -100, last_write = -100;
  always @(posedge fwwrn_n) if (resetn) begin cap_f = freqword; nf++; end
  always @(posedge pwwrn_n) if (resetn) begin cap_p = phaseword; np++; end
  always @(posedge sysclk) cyc++;

  logic fw_q = 1, pw_q = 1;
  always @(posedge sysclk) begin
    #2;
    if (!fwwrn_n && fw_q) f_fall = cyc;
    if (!pwwrn_n && pw_q) p_fall = cyc;
    if ((!fwwrn_n && fw_q) || (!pwwrn_n && pw_q)) begin
      checks++;
      if (cyc - last_write < dut.WRITE_GAP) begin failures++; $display("FAIL writes too close"); end
      last_write = cyc;
    end
    if (fwwrn_n && !fw_q) begin
      checks++;
      if (cyc - f_fall != dut.STROBE_LOW) begin failures++; $display("FAIL fw strobe width"); end
    end
    if (pwwrn_n && !pw_q) begin
      checks++;
      if (cyc - p_fall != dut.STROBE_LOW) begin failures++; $display("FAIL pw strobe width"); end
    end
    fw_q = fwwrn_n; pw_q = pwwrn_n;
  end

  task automatic expect_words(input string what);
    logic [31:0] ef;
    logic [7:0]  ep;
    ef = (mode == MOD_FSK && data) ? freqword1 : freqword0;
    ep = (mode == MOD_PSK && !data) ? 8'h80 : 8'h00;
    checks += 2;
    if (cap_f !== ef) begin failures++; $display("FAIL %s: freq %h expected %h", what, cap_f, ef); end
    if (cap_p !== ep) begin failures++; $display("FAIL %s: phase %h expected %h", what, cap_p, ep); end
  endtask

  initial begin
    int c0, nf0;
    #23 resetn = 1;
    repeat (20) @(posedge sysclk);
    expect_words("after reset");
    // data change timing: strobe falls on the third edge after the change
    for (int i = 0; i < 60; i++) begin
      logic nd;
      @(negedge sysclk);
      if (i == 20) mode = MOD_PSK;
      if (i == 45) begin mode = MOD_FSK; freqword1 = 32'hABCD_0123; end
      nd = (i % 5 == 3) ? data : 1'($urandom);
      data = nd;
      repeat (14) @(posedge sysclk);
      expect_words("after change");
    end
    // a data change must give a strobe exactly 3 edges later
    @(negedge sysclk);
    mode = MOD_PSK;
    repeat (14) @(posedge sysclk);
    @(negedge sysclk);
    c0 = cyc;
    data = ~data;
    repeat (14) @(posedge sysclk);
    checks++;
    if (p_fall != c0 + 3) begin failures++; $display("FAIL latency %0d", p_fall - c0); end
    // no rewrite when the selected words do not change (PSK: data does not move freq)
    nf0 = nf;
    @(negedge sysclk); data = ~data;
    repeat (14) @(posedge sysclk);
    checks++;
    if (nf != nf0) begin failures++; $display("FAIL freq rewritten in PSK"); end
    expect_words("final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
