// tb_nco -- the NCO through its pins. Frequency and phase words are written
// with strobes that are not aligned to sysclk. A reference model built here
// (a plain 32-bit accumulator, an 8-bit phase adder and the ideal sine
// formula) predicts, edge by edge, phase, modphase, dacout and the four
// square-wave outputs, using the pin timing: with e0 the first sysclk edge
// after a strobe's rising edge, a new tuning word is added from e3 and a new
// phase word is in effect from e2. Also checks Fout = FREQWORD*SYSCLK/2^32
// by counting periods, and that dacclk follows sysclk.
module tb_nco;
  logic        sysclk = 0, resetn = 0;
  logic [31:0] freqword = '0;
  logic [7:0]  phaseword = '0;
  logic        fwwrn_n = 1, pwwrn_n = 1;
  logic [7:0]  dacout, phase, modphase;
  logic        dacclk, sin_o, cos_o, msin, mcos;
  int checks = 0, failures = 0;

  nco dut (.*);

  always #5 sysclk = ~sysclk;

  initial begin
    #2000000;
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

  // reference model
  int          n = 0;            // sysclk edges since reset release
  logic [31:0] acc  [0:65535];
  logic [7:0]  psyn [0:65535];
  logic [7:0]  mexp [0:65535];
  logic [31:0] fcur = '0, fpend;
  logic [7:0]  pcur = '0, ppend;
  int          f_at = -1, p_at = -1;

  initial begin
    acc[0] = '0; psyn[0] = '0; mexp[0] = '0;
  end

  always @(posedge sysclk) if (resetn) begin
    n = n + 1;
    if (n == f_at) fcur = fpend;
    if (n == p_at) pcur = ppend;
    acc[n]  = acc[n-1] + fcur;
    psyn[n] = pcur;
    mexp[n] = ((n >= 4) ? acc[n-4][31:24] : 8'h00) + psyn[n-1];
    #1;
    checks++;
    if (phase !== ((n >= 3) ? acc[n-3][31:24] : 8'h00)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d phase %h", n, phase);
    end
    checks++;
    if (modphase !== mexp[n]) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d modphase %h expected %h", n, modphase, mexp[n]);
    end
    checks++;
    if (dacout !== lut(mexp[n-1])) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d dacout %h expected %h", n, dacout, lut(mexp[n-1]));
    end
    checks++;
    if (sin_o !== ~phase[7] || cos_o !== (phase[7] == phase[6]) ||
        msin !== ~modphase[7] || mcos !== (modphase[7] == modphase[6])) failures++;
  end

  always @(negedge sysclk) begin
    checks++;
    if (dacclk !== 1'b0) failures++;
  end

  task automatic write(input bit do_f, input logic [31:0] f, input bit do_p, input logic [7:0] p);
    @(posedge sysclk);
    #2.3;
    if (do_f) begin freqword = f; fwwrn_n = 0; end
    if (do_p) begin phaseword = p; pwwrn_n = 0; end
    #12.3;
    fwwrn_n = 1; pwwrn_n = 1;
    // n edges have passed; e0 is edge n+1
    if (do_f) begin fpend = f; f_at = n + 4; end
    if (do_p) begin ppend = p; p_at = n + 3; end
    #1.1;
    freqword = $urandom; phaseword = 8'($urandom);
  endtask

  initial begin
    int rises;
    logic last;
    #23 resetn = 1;
    repeat (20) @(posedge sysclk);
    write(1, 32'h0123_4567, 0, 0);   repeat (600) @(posedge sysclk);
    write(0, 0, 1, 8'h80);           repeat (300) @(posedge sysclk);
    write(1, 32'hF000_0001, 1, 8'h40); repeat (300) @(posedge sysclk);
    write(1, 32'h00FF_FFFF, 0, 0);   repeat (300) @(posedge sysclk);
    for (int i = 0; i < 20; i++) begin
      write(1, $urandom, (i % 3) == 0, 8'($urandom));
      repeat (10 + (i % 7) * 13) @(posedge sysclk);
    end
    // output frequency: 2^32/32 gives one period every 32 clocks
    write(1, 32'h0800_0000, 1, 8'h00);
    repeat (20) @(posedge sysclk);
    rises = 0; last = msin;
    repeat (640) begin
      @(posedge sysclk); #2;
      if (msin && !last) rises++;
      last = msin;
    end
    checks++;
    if (rises != 20) begin failures++; $display("FAIL rate: %0d periods in 640 clocks", rises); end
    // reset stops the carrier at 0 radians
    resetn = 0; #1;
    checks++;
    if (phase !== 0 || modphase !== 0 || dacout !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
