// tb_pn_generator -- checks IDATA/QDATA against Gold sequences built here
// from the two recurrences a(n+5)=a(n+2)^a(n) and b(n+5)=b(n+4)^b(n+3)^b(n+2)^b(n),
// their period of 31 chips, and that I and Q are different sequences.
module tb_pn_generator;
  logic pnclk = 0, resetn = 0;
  logic idata, qdata;
  int checks = 0, failures = 0;
  bit ia[200], ib[200], qa[200], qb[200];
  bit iseq[200], qseq[200];

  pn_generator dut (.pnclk, .resetn, .idata, .qdata);

  always #7 pnclk = ~pnclk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(input logic [4:0] sa, input logic [4:0] sb, output bit ra[200], output bit rb[200]);
    for (int k = 0; k < 5; k++) begin ra[k] = sa[k]; rb[k] = sb[k]; end
    for (int n = 0; n + 5 < 200; n++) begin
      ra[n+5] = ra[n+2] ^ ra[n];
      rb[n+5] = rb[n+4] ^ rb[n+3] ^ rb[n+2] ^ rb[n];
    end
  endtask

  initial begin
    int differ;
    build(5'b00001, 5'b00001, ia, ib);
    build(5'b00001, 5'b10110, qa, qb);
    for (int n = 0; n < 200; n++) begin
      iseq[n] = ia[n] ^ ib[n];
      qseq[n] = qa[n] ^ qb[n];
    end
    repeat (3) @(negedge pnclk);
    resetn = 1;
    for (int n = 0; n < 100; n++) begin
      // n rising edges of pnclk have passed since reset
      checks += 2;
      if (idata !== iseq[n]) begin failures++; $display("FAIL I chip %0d", n); end
      if (qdata !== qseq[n]) begin failures++; $display("FAIL Q chip %0d", n); end
      @(negedge pnclk);
    end
    // period 31: the m-sequences have period 31 and the Gold code repeats with it
    for (int n = 0; n < 31; n++) begin
      checks++;
      if (iseq[n] != iseq[n+31] || qseq[n] != qseq[n+31]) failures++;
    end
    differ = 0;
    for (int n = 0; n < 31; n++) if (iseq[n] != qseq[n]) differ++;
    checks++;
    if (differ == 0) failures++;
    // reset restarts the sequence
    resetn = 0; #3; resetn = 1;
    checks++;
    if (idata !== iseq[0] || qdata !== qseq[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
