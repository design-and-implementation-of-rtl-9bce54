// psk_fsk_modulator -- keys the NCO's frequency or phase word with a data bit.
//
// FSK (mode = MOD_FSK): a data bit of 0 selects tuning word freqword0 and a
// data bit of 1 selects freqword1; the phase word is 0. PSK (mode = MOD_PSK):
// the tuning word is freqword0 and the phase word is 0 for a data bit of 1
// and 180 degrees (0x80) for a data bit of 0. The choice of word is a
// multiplexer on the data bit, as in the design; the mapping of bit values to
// phases follows the PSK definition (bit 1 at 0 rad, bit 0 at pi).
//
// The data bit comes from another clock domain (PNCLK) and is synchronised
// by two flip-flops. Whenever the selected frequency or phase word differs
// from the one last written (after a data change, a mode change, a new
// freqword0/1, or after reset), the modulator drives the new word out and
// pulls the matching write strobe (fwwrn_n, pwwrn_n) low for STROBE_LOW
// cycles; the NCO takes the word on the strobe's rising edge. A new write
// starts at most every WRITE_GAP cycles, which respects the NCO's spacing
// between writes. The write sequencing is this design's choice.
//
// Timing: counting the sysclk edge that first samples a data change as edge
// 1, the strobe falls at edge 3 and rises STROBE_LOW edges later. The data bit must stay stable for at least
// WRITE_GAP sysclk cycles. resetn (asynchronous, active low) clears the
// written words to 0 and raises both strobes.
module psk_fsk_modulator #(
  parameter int unsigned FREQ_W     = dds_pkg::FREQ_W,
  parameter int unsigned STROBE_LOW = 2,
  parameter int unsigned WRITE_GAP  = 8
) (
  input  logic              sysclk,
  input  logic              resetn,
  input  dds_pkg::mod_mode_e         mode,
  input  logic              data,
  input  logic [FREQ_W-1:0] freqword0,
  input  logic [FREQ_W-1:0] freqword1,
  output logic [FREQ_W-1:0] freqword,
  output logic              fwwrn_n,
  output logic [dds_pkg::PHASE_W-1:0] phaseword,
  output logic              pwwrn_n
);

  logic              data_m, data_s;
  logic [FREQ_W-1:0] sel_freq;
  logic [dds_pkg::PHASE_W-1:0] sel_phase;
  logic              fchg, pchg;
  localparam int unsigned CNT_W = $clog2(WRITE_GAP + 1);
  logic [CNT_W-1:0]  cnt;

  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) begin
      data_m <= 1'b0;
      data_s <= 1'b0;
    end else begin
      data_m <= data;
      data_s <= data_m;
    end
  end

  // word multiplexers
  always_comb begin
    if (mode == dds_pkg::MOD_FSK) begin
      sel_freq  = data_s ? freqword1 : freqword0;
      sel_phase = '0;
    end else begin
      sel_freq  = freqword0;
      sel_phase = data_s ? '0 : dds_pkg::PHASE_180;
    end
  end

  assign fchg = (sel_freq  != freqword);
  assign pchg = (sel_phase != phaseword);

  // write sequencer
  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) begin
      freqword  <= '0;
      phaseword <= '0;
      fwwrn_n   <= 1'b1;
      pwwrn_n   <= 1'b1;
      cnt       <= '0;
    end else if (cnt == 0) begin
      if (fchg || pchg) begin
        freqword  <= sel_freq;
        phaseword <= sel_phase;
        fwwrn_n   <= ~fchg;
        pwwrn_n   <= ~pchg;
        cnt       <= 1;
      end
    end else begin
      if (cnt == CNT_W'(STROBE_LOW)) begin
        fwwrn_n <= 1'b1;
        pwwrn_n <= 1'b1;
      end
      cnt <= (cnt == CNT_W'(WRITE_GAP - 1)) ? '0 : cnt + 1'b1;
    end
  end

  // The word must not move while its strobe is low.
  a_fw_stable: assert property (@(posedge sysclk) disable iff (!resetn)
                                !fwwrn_n && !$rose(!fwwrn_n) |-> $stable(freqword));
  a_pw_stable: assert property (@(posedge sysclk) disable iff (!resetn)
                                !pwwrn_n && !$rose(!pwwrn_n) |-> $stable(phaseword));

endmodule
