// pn_generator -- test data source for the modulator: IDATA and QDATA.
//
// Not part of the oscillator itself; it provides a repeatable pseudo-random
// bit pattern that modulates the carrier. Two 5-bit Gold code generators
// (gold_code_gen) are clocked by PNCLK, so PNCLK sets the data rate. Both use
// the same preferred polynomial pair; the Q generator starts its second
// register at a different state, so IDATA and QDATA are two different Gold
// sequences, each of period 31 chips. Which family members are used is this
// design's choice.
//
// Timing: IDATA and QDATA change after each rising edge of pnclk.
// resetn (asynchronous, active low) restarts both sequences.
module pn_generator (
  input  logic pnclk,
  input  logic resetn,
  output logic idata,
  output logic qdata
);

  gold_code_gen #(.SEED_A(5'b00001), .SEED_B(5'b00001)) u_gen_i (
    .clk(pnclk), .rst_n(resetn), .en(1'b1), .data(idata)
  );

  gold_code_gen #(.SEED_A(5'b00001), .SEED_B(5'b10110)) u_gen_q (
    .clk(pnclk), .rst_n(resetn), .en(1'b1), .data(qdata)
  );

endmodule
