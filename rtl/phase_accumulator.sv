// phase_accumulator -- 32-bit phase accumulator pipelined in 8-bit sections.
//
// Each clock the synchronous frequency word is added to the phase. The
// addition is split into NSECT = FREQ_W/SECT_W sections, each a cla_adder
// with its own sum register (pipe[0]..pipe[3], pipe[3] being the document's
// pipe4). The carry out of section k is registered and feeds the carry in of
// section k+1 on the next cycle, so section k holds byte k of the true phase
// k cycles late. Because load_freq_word updates byte k of the tuning word k
// cycles after byte 0, the top section reproduces exactly the top byte of a
// plain 32-bit accumulator, delayed by NSECT-1 cycles. Only that top section
// is brought out, as the 8-bit quantised phase. The square-wave outputs are
// derived from it: sin_o is high while the MSB is 0 (first half period) and
// cos_o is high while the two MSBs are equal (first and last quarter); this
// polarity is this design's choice.
//
// Timing: a change of syncfreq byte 0 is first added at the next sysclk edge;
// phase follows the plain accumulator with NSECT-1 cycles of delay. resetn
// (asynchronous, active low) clears all sections and carries, phase 0.
module phase_accumulator #(
  parameter int unsigned FREQ_W = dds_pkg::FREQ_W,
  parameter int unsigned SECT_W = dds_pkg::SECT_W
) (
  input  logic              sysclk,
  input  logic              resetn,
  input  logic [FREQ_W-1:0] syncfreq,
  output logic [SECT_W-1:0] phase,
  output logic              sin_o,
  output logic              cos_o
);

  localparam int unsigned NSECT = FREQ_W / SECT_W;

  logic [SECT_W-1:0] pipe  [NSECT];
  logic [SECT_W-1:0] sum   [NSECT];
  logic [NSECT-1:0]  cout;
  logic [NSECT-1:0]  creg;   // registered carry out of each section
  logic [NSECT-1:0]  cin;

  assign cin = {creg[NSECT-2:0], 1'b0};

  for (genvar k = 0; k < NSECT; k++) begin : g_sect
    cla_adder #(.W(SECT_W)) u_add (
      .a   (pipe[k]),
      .b   (syncfreq[k*SECT_W +: SECT_W]),
      .cin (cin[k]),
      .sum (sum[k]),
      .cout(cout[k])
    );

    always_ff @(posedge sysclk or negedge resetn) begin
      if (!resetn) begin
        pipe[k] <= '0;
        creg[k] <= 1'b0;
      end else begin
        pipe[k] <= sum[k];
        creg[k] <= cout[k];
      end
    end
  end

  assign phase = pipe[NSECT-1];
  assign sin_o = ~phase[SECT_W-1];
  assign cos_o = ~(phase[SECT_W-1] ^ phase[SECT_W-2]);

endmodule
