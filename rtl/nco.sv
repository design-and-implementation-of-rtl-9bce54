// nco -- numerically controlled oscillator with an 8-bit sine output.
//
// A 32-bit tuning word FREQWORD sets the carrier frequency
//     Fout = FREQWORD * SYSCLK / 2^32
// and an 8-bit phase word PHASEWORD adds a phase offset of
//     Pout = PHASEWORD * 2*pi / 2^8 radians.
// Both words are written with active-low strobes (fwwrn_n, pwwrn_n) that may
// be asynchronous to sysclk; each word is taken on the rising edge of its
// strobe. Data path: load_freq_word -> phase_accumulator (pipelined in 8-bit
// sections) -> phase_modulator (adds the synchronous phase word from
// load_phase_word) -> sine_lookup (quarter-wave ROM) -> dacout.
//
// Outputs: dacout is the two's-complement sine amplitude, valid at the rising
// edge of dacclk, which is sysclk fed back out so that an external DAC samples
// with the same delay. sin_o/cos_o are square waves from the unmodulated
// accumulator phase, msin/mcos square waves from the modulated phase.
// phase and modphase are the 8-bit unmodulated and modulated phases.
// This block structure and pin set follow the NCO design.
//
// Timing (sysclk edges after the strobe's rising edge is first sampled at
// e0): a new tuning word is added from edge e3 and shows in phase from e6,
// modphase from e7 and dacout from e8; a new phase word shows in modphase
// from e3 and in dacout from e4. resetn (asynchronous, active low) clears the
// word registers and the phase, stopping the carrier at 0 radians.
module nco #(
  parameter int unsigned FREQ_W  = dds_pkg::FREQ_W,
  parameter int unsigned SECT_W  = dds_pkg::SECT_W
) (
  input  logic              sysclk,
  input  logic              resetn,
  input  logic [FREQ_W-1:0] freqword,
  input  logic              fwwrn_n,
  input  logic [7:0]        phaseword,
  input  logic              pwwrn_n,
  output logic [7:0]        dacout,
  output logic              dacclk,
  output logic              sin_o,
  output logic              cos_o,
  output logic              msin,
  output logic              mcos,
  output logic [7:0]        phase,
  output logic [7:0]        modphase
);

  logic [FREQ_W-1:0] syncfreq;
  logic [7:0]        syncphswd;

  load_freq_word #(.FREQ_W(FREQ_W), .SECT_W(SECT_W)) u_ldfw (
    .sysclk, .resetn, .freqword, .fwwrn_n, .syncfreq
  );

  phase_accumulator #(.FREQ_W(FREQ_W), .SECT_W(SECT_W)) u_acc (
    .sysclk, .resetn, .syncfreq, .phase, .sin_o, .cos_o
  );

  load_phase_word #(.PHASE_W(8)) u_ldpw (
    .sysclk, .resetn, .phaseword, .pwwrn_n, .syncphswd
  );

  phase_modulator #(.PHASE_W(8)) u_pmod (
    .sysclk, .resetn, .syncphswd, .phase, .modphase
  );

  sine_lookup u_sinlup (
    .sysclk, .resetn, .modphase, .dacout
  );

  assign dacclk = sysclk;
  assign msin   = ~modphase[7];
  assign mcos   = ~(modphase[7] ^ modphase[6]);

endmodule
