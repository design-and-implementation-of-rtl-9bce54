// dds_pkg -- sizes and types shared by the PSK/FSK direct digital synthesiser.
//
// The widths are those of the NCO pin interface: a 32-bit frequency tuning
// word added in four 8-bit pipelined sections, an 8-bit phase word, an 8-bit
// DAC amplitude word and a quarter-wave sine ROM of 64 words by 7 bits. The
// test data come from 5-bit Gold code generators (period 2^5-1 = 31).
package dds_pkg;

  parameter int unsigned FREQ_W   = 32; // frequency tuning word FREQWORD[31:0]
  parameter int unsigned SECT_W   = 8;  // width of one accumulator pipeline section
  parameter int unsigned PHASE_W  = 8;  // quantised phase / PHASEWORD[7:0]
  parameter int unsigned AMP_W    = 8;  // DACOUT[7:0]

  // Modulation applied to the carrier by the modulator in front of the NCO.
  typedef enum logic {
    MOD_FSK = 1'b0, // data bit selects one of two tuning words, phase word 0
    MOD_PSK = 1'b1  // fixed tuning word, data bit selects 0 or 180 degrees
  } mod_mode_e;

  // Phase word for a 180 degree shift: 2^(PHASE_W-1) * 2*pi / 2^PHASE_W = pi.
  localparam logic [PHASE_W-1:0] PHASE_180 = PHASE_W'(1) << (PHASE_W - 1);

endpackage
