// load_phase_word -- brings the phase modulation word into the SYSCLK domain.
//
// PHASEWORD is captured into pwreg on the rising edge of the active-low write
// strobe pwwrn_n, which may be asynchronous to sysclk. The strobe is sampled
// by a metastability flip-flop (pwwrn_m) and a synchronous register
// (pwwrns); their rising-edge decode, registered as 'load', copies pwreg into
// the synchronous phase word register phswd, brought out as syncphswd. The
// structure follows the NCO design; registering 'load' is this design's
// choice and keeps it in step with the frequency word path.
//
// Timing: pwwrn_n rises before sysclk edge e0; edge e1 sets load and edge e2
// updates syncphswd. Writes must be at least 4 sysclk cycles apart and
// phaseword stable around the rising edge of pwwrn_n. resetn (asynchronous,
// active low) clears pwreg and syncphswd.
module load_phase_word #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               sysclk,
  input  logic               resetn,
  input  logic [PHASE_W-1:0] phaseword,
  input  logic               pwwrn_n,
  output logic [PHASE_W-1:0] syncphswd
);

  logic [PHASE_W-1:0] pwreg;
  logic               pwwrn_m, pwwrns, load;

  always_ff @(posedge pwwrn_n or negedge resetn) begin
    if (!resetn) pwreg <= '0;
    else         pwreg <= phaseword;
  end

  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) begin
      pwwrn_m   <= 1'b1;
      pwwrns    <= 1'b1;
      load      <= 1'b0;
      syncphswd <= '0;
    end else begin
      pwwrn_m <= pwwrn_n;
      pwwrns  <= pwwrn_m;
      load    <= pwwrn_m & ~pwwrns;
      if (load) syncphswd <= pwreg;
    end
  end

endmodule
