// tb_dds_top -- end-to-end test of the PSK/FSK sine generator at its default
// sizes. sysclk has a 200 ns period, pnclk a slower unrelated one. The test
// runs FSK, switches to PSK, reprograms a tuning word, goes back to FSK and
// finally checks the output frequency.
//
// Reference models built here: the Gold sequences for IDATA/QDATA (from the
// two LFSR recurrences); the FSK/PSK word mapping applied to the reference
// data bit, checked at every write strobe inside the design; and the
// oscillator (plain 32-bit accumulator, phase adder, ideal sine formula)
// which predicts dacout, msin and mcos every clock from the words written,
// with a new tuning word added from the 3rd and a phase word effective from
// the 2nd sysclk edge after the strobe is first sampled.
//
// Each mechanism must occur at least once: FSK frequency switch, PSK
// 180-degree flip, mode switch, tuning-word reprogramming, carry between
// accumulator sections, phase wrap-around, and both half waves at dacout.
module tb_dds_top;
  import dds_pkg::*;
  logic        sysclk = 0, pnclk = 0, resetn = 1;
  mod_mode_e   mode = MOD_FSK;
  logic [31:0] freqword0 = 32'h0123_4567, freqword1 = 32'h0345_6789;
  logic [7:0]  dacout;
  logic        dacclk, sin_o, cos_o, msin, mcos, idata, qdata;
  int checks = 0, failures = 0;

  dds_top dut (.*);

  always #100 sysclk = ~sysclk;
  always #2065 pnclk = ~pnclk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] lut(logic [7:0] p);
    real s;
    int  m;
    s = $sin((real'(p) + 0.5) * 2.0 * 3.14159265358979 / 256.0);
    m = int'($floor(127.0 * (s < 0 ? -s : s) + 0.5));
    return (s > 0) ? 8'(m) : 8'(-m - 1);
  endfunction

  // ---------------- PN reference ----------------
  bit ia[0:1023], ib[0:1023], qa[0:1023], qb[0:1023];
  int chip = 0;              // pnclk edges since reset
  bit ref_data = 0;
  initial begin
    logic [4:0] sa, sbi, sbq;
    sa = 5'b00001; sbi = 5'b00001; sbq = 5'b10110;
    for (int k = 0; k < 5; k++) begin
      ia[k] = sa[k]; ib[k] = sbi[k]; qa[k] = sa[k]; qb[k] = sbq[k];
    end
    for (int n = 0; n + 5 < 1024; n++) begin
      ia[n+5] = ia[n+2] ^ ia[n];  qa[n+5] = qa[n+2] ^ qa[n];
      ib[n+5] = ib[n+4] ^ ib[n+3] ^ ib[n+2] ^ ib[n];
      qb[n+5] = qb[n+4] ^ qb[n+3] ^ qb[n+2] ^ qb[n];
    end
  end
  always @(posedge pnclk) if (resetn) begin
    chip = chip + 1;
    ref_data = ia[chip] ^ ib[chip];
    #10;
    checks += 2;
    if (idata !== (ia[chip] ^ ib[chip])) begin failures++; $display("FAIL idata chip %0d", chip); end
    if (qdata !== (qa[chip] ^ qb[chip])) begin failures++; $display("FAIL qdata chip %0d", chip); end
  end

  // ---------------- oscillator reference ----------------
  int          n = 0;
  logic [31:0] acc  [0:65535];
  logic [7:0]  psyn [0:65535];
  logic [7:0]  mexp [0:65535];
  logic [31:0] fcur = '0, fpend;
  logic [7:0]  pcur = '0, ppend;
  int          f_at = -1, p_at = -1;
  logic        fw_q = 1, pw_q = 1;
  logic [31:0] last_f = '0;

  // mechanism counters
  int n_fsk_switch = 0, n_psk_flip = 0, n_mode_switch = 0, n_reprogram = 0;
  int n_carry [3] = '{0, 0, 0};
  int n_wrap = 0, n_pos = 0, n_neg = 0;
  logic [7:0] last_phase = '0;

  initial begin
    acc[0] = '0; psyn[0] = '0; mexp[0] = '0;
  end

  always @(posedge sysclk) if (resetn) begin
    logic [31:0] ef;
    logic [7:0]  ep;
    n = n + 1;
    if (n == f_at) fcur = fpend;
    if (n == p_at) pcur = ppend;
    acc[n]  = acc[n-1] + fcur;
    psyn[n] = pcur;
    mexp[n] = ((n >= 4) ? acc[n-4][31:24] : 8'h00) + psyn[n-1];
    #1;
    // words written into the oscillator
    ef = (mode == MOD_FSK && ref_data) ? freqword1 : freqword0;
    ep = (mode == MOD_PSK && !ref_data) ? 8'h80 : 8'h00;
    if (dut.fwwrn_n && !fw_q) begin
      fpend = dut.freqword; f_at = n + 4;
      checks++;
      if (dut.freqword !== ef) begin failures++; $display("FAIL n=%0d FSK word %h expected %h", n, dut.freqword, ef); end
      if (mode == MOD_FSK && last_f != 0 && (dut.freqword == freqword0 || dut.freqword == freqword1)) n_fsk_switch++;
      last_f = dut.freqword;
    end
    if (dut.pwwrn_n && !pw_q) begin
      ppend = dut.phaseword; p_at = n + 3;
      checks++;
      if (dut.phaseword !== ep) begin failures++; $display("FAIL n=%0d PSK word %h expected %h", n, dut.phaseword, ep); end
      if (mode == MOD_PSK) n_psk_flip++;
    end
    fw_q = dut.fwwrn_n; pw_q = dut.pwwrn_n;
    // outputs
    checks++;
    if (dacout !== lut(mexp[n-1])) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d dacout %h expected %h", n, dacout, lut(mexp[n-1]));
    end
    checks++;
    if (msin !== ~mexp[n][7] || mcos !== (mexp[n][7] == mexp[n][6])) failures++;
    checks++;
    if (sin_o !== ~acc[n >= 3 ? n-3 : 0][31]) failures++;
    // mechanisms
    for (int k = 0; k < 3; k++) if (dut.u_nco.u_acc.creg[k]) n_carry[k]++;
    if (dut.u_nco.phase < last_phase) n_wrap++;
    last_phase = dut.u_nco.phase;
    if (dacout[7]) n_neg++; else n_pos++;
  end

  always @(negedge sysclk) begin
    checks++;
    if (dacclk !== 1'b0) failures++;
  end

  task automatic report(input string what, input int count);
    checks++;
    $display("mechanism %-22s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    int rises;
    logic last;
    #1 resetn = 0;    // asynchronous reset: pnclk has no edge while it is low
    #449 resetn = 1;
    // FSK over two full PN periods
    repeat (62) @(posedge pnclk);
    @(negedge sysclk); mode = MOD_PSK; n_mode_switch++;
    repeat (62) @(posedge pnclk);
    @(negedge sysclk); freqword0 = 32'h1000_0001; n_reprogram++;
    repeat (31) @(posedge pnclk);
    @(negedge sysclk); mode = MOD_FSK; n_mode_switch++;
    repeat (31) @(posedge pnclk);
    // output frequency: both words 2^32/32 -> one period every 32 sysclk cycles
    @(negedge sysclk); freqword0 = 32'h0800_0000; freqword1 = 32'h0800_0000; n_reprogram++;
    repeat (30) @(posedge sysclk);
    rises = 0; last = msin;
    repeat (640) begin
      @(posedge sysclk); #2;
      if (msin && !last) rises++;
      last = msin;
    end
    checks++;
    if (rises != 20) begin failures++; $display("FAIL rate: %0d periods in 640 clocks", rises); end
    report("FSK frequency switch", n_fsk_switch);
    report("PSK 180-degree flip", n_psk_flip);
    report("mode switch", n_mode_switch);
    report("tuning word reprogram", n_reprogram);
    report("carry section 0->1", n_carry[0]);
    report("carry section 1->2", n_carry[1]);
    report("carry section 2->3", n_carry[2]);
    report("phase wrap", n_wrap);
    report("positive half wave", n_pos);
    report("negative half wave", n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
