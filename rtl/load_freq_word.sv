// load_freq_word -- brings the frequency tuning word into the SYSCLK domain.
//
// FREQWORD is captured into fwreg on the rising edge of the active-low write
// strobe fwwrn_n, which may be asynchronous to sysclk. The strobe itself is
// sampled by a metastability flip-flop (fwwrn_m) followed by a synchronous
// register (fwwrns); the rising edge seen between the two produces the load
// strobe loadp[0] (loadp1), which is delayed through three more registers
// (loadp2..loadp4). Load strobe k copies byte k of fwreg into byte k of
// syncfreq, so the new word enters the pipelined accumulator one 8-bit
// section per cycle, lower byte first, in step with the carry moving up
// through the accumulator pipeline. This structure follows the NCO design;
// registering loadp1 (rather than decoding it combinationally) is this
// design's choice.
//
// Timing: fwwrn_n rises before sysclk edge e0. Edge e0 samples it, edge e1
// sets loadp1, and edges e2..e5 load bytes 0..3 of syncfreq. Writes must be
// at least 6 sysclk cycles apart and freqword must be stable around the
// rising edge of fwwrn_n. resetn (asynchronous, active low) clears fwreg and
// syncfreq, which stops the carrier.
module load_freq_word #(
  parameter int unsigned FREQ_W = dds_pkg::FREQ_W,
  parameter int unsigned SECT_W = dds_pkg::SECT_W
) (
  input  logic              sysclk,
  input  logic              resetn,
  input  logic [FREQ_W-1:0] freqword,
  input  logic              fwwrn_n,
  output logic [FREQ_W-1:0] syncfreq
);

  localparam int unsigned NSECT = FREQ_W / SECT_W;

  logic [FREQ_W-1:0] fwreg;
  logic              fwwrn_m, fwwrns;
  logic [NSECT-1:0]  loadp;

  // capture register, clocked by the write strobe itself
  always_ff @(posedge fwwrn_n or negedge resetn) begin
    if (!resetn) fwreg <= '0;
    else         fwreg <= freqword;
  end

  // strobe synchroniser, rising-edge detector and load pipe
  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) begin
      fwwrn_m <= 1'b1;
      fwwrns  <= 1'b1;
      loadp   <= '0;
    end else begin
      fwwrn_m <= fwwrn_n;
      fwwrns  <= fwwrn_m;
      loadp   <= {loadp[NSECT-2:0], fwwrn_m & ~fwwrns};
    end
  end

  // staggered byte-wise update of the synchronous word
  for (genvar k = 0; k < NSECT; k++) begin : g_sect
    always_ff @(posedge sysclk or negedge resetn) begin
      if (!resetn)       syncfreq[k*SECT_W +: SECT_W] <= '0;
      else if (loadp[k]) syncfreq[k*SECT_W +: SECT_W] <= fwreg[k*SECT_W +: SECT_W];
    end
  end

endmodule
