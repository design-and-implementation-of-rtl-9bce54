// dds_top -- programmable sine wave generator with FSK/PSK modulation.
//
// A direct digital synthesiser: the nco turns a 32-bit tuning word into an
// 8-bit sampled sine (dacout) for an external DAC and low-pass filter. The
// pn_generator, clocked by pnclk, produces the Gold-code test data IDATA and
// QDATA; IDATA keys the carrier through psk_fsk_modulator, which writes the
// NCO's frequency word (FSK: freqword0 for a 0, freqword1 for a 1) or phase
// word (PSK: carrier freqword0, 0 rad for a 1 and pi for a 0). mode selects
// FSK or PSK and may change at any time; freqword0/1 may be reprogrammed at
// any time and are written into the NCO automatically.
//
// Carrier frequency Fout = FREQWORD * f(sysclk) / 2^32. The PN data rate is
// f(pnclk), which must be below f(sysclk)/10 so every data bit is written
// into the NCO. dacout is two's complement and valid at the rising edge of
// dacclk (sysclk fed back). sin_o/cos_o are square waves of the unmodulated
// carrier and msin/mcos of the modulated one. resetn is asynchronous and
// active low.
module dds_top
  import dds_pkg::*;
(
  input  logic              sysclk,
  input  logic              pnclk,
  input  logic              resetn,
  input  mod_mode_e         mode,
  input  logic [FREQ_W-1:0] freqword0,
  input  logic [FREQ_W-1:0] freqword1,
  output logic [AMP_W-1:0]  dacout,
  output logic              dacclk,
  output logic              sin_o,
  output logic              cos_o,
  output logic              msin,
  output logic              mcos,
  output logic              idata,
  output logic              qdata
);

  logic [FREQ_W-1:0]  freqword;
  logic [PHASE_W-1:0] phaseword;
  logic               fwwrn_n, pwwrn_n;
  logic [PHASE_W-1:0] phase, modphase;

  pn_generator u_pn (
    .pnclk, .resetn, .idata, .qdata
  );

  psk_fsk_modulator u_mod (
    .sysclk, .resetn, .mode, .data(idata), .freqword0, .freqword1,
    .freqword, .fwwrn_n, .phaseword, .pwwrn_n
  );

  nco u_nco (
    .sysclk, .resetn, .freqword, .fwwrn_n, .phaseword, .pwwrn_n,
    .dacout, .dacclk, .sin_o, .cos_o, .msin, .mcos, .phase, .modphase
  );

endmodule
