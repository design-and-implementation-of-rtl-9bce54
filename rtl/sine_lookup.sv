// sine_lookup -- turns the 8-bit modulated phase into an 8-bit sine amplitude.
//
// The phase is split into quadrant bits [7:6] and a 6-bit position [5:0].
// In the second and fourth quarters the position is bit-inverted, which walks
// the quarter-wave table (sine_rom) backwards. The MSB of the amplitude word
// equals the phase MSB, as in the NCO design: in the first half period the
// output is the table value, in the second half it is the bitwise inverse of
// the table value with the MSB set. dacout is therefore a two's-complement
// word: +amp for the positive half wave and -amp-1 for the negative half, a
// sine symmetric about -1/2 LSB spanning -128..+127. For an offset-binary DAC
// invert dacout[7]. Reading the MSB as a two's-complement sign is this
// design's choice.
//
// Timing: dacout is registered, one sysclk cycle after modphase. resetn
// (asynchronous, active low) clears it.
module sine_lookup (
  input  logic       sysclk,
  input  logic       resetn,
  input  logic [7:0] modphase,
  output logic [7:0] dacout
);

  logic [5:0] addr;
  logic [6:0] amp;
  logic [6:0] mag;

  assign addr = modphase[6] ? ~modphase[5:0] : modphase[5:0];

  sine_rom u_rom (.addr(addr), .amp(amp));

  assign mag = modphase[7] ? ~amp : amp;

  always_ff @(posedge sysclk or negedge resetn) begin
    if (!resetn) dacout <= '0;
    else         dacout <= {modphase[7], mag};
  end

endmodule
