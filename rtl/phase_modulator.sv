// phase_modulator -- adds the phase offset to the quantised carrier phase.
//
// A cla_adder sums the synchronous phase word (input A) and the 8-bit phase
// accumulator output (input B), modulo 2^PHASE_W; the sum is registered in
// mphsreg and brought out as modphase. A phase word P shifts the carrier by
// P * 2*pi / 2^PHASE_W radians, so PSK with a 180 degree step uses
// P = 2^(PHASE_W-1). This follows the NCO design.
//
// Timing: one sysclk cycle from phase/syncphswd to modphase. resetn
// (asynchronous, active low) clears mphsreg.
module phase_modulator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               sysclk,
  input  logic               resetn,
  input  logic [PHASE_W-1:0] syncphswd,
  input  logic [PHASE_W-1:0] phase,
  output logic [PHASE_W-1:0] modphase
);

  logic [PHASE_W-1:0] sum;
  logic               unused_cout;

  cla_adder #(.W(PHASE_W)) u_add (
    .a   (syncphswd),
    .b   (phase),
    .cin (1'b0),
    .sum (sum),
    .cout(unused_cout)
  );

  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) modphase <= '0;
    else         modphase <= sum;
  end

endmodule
