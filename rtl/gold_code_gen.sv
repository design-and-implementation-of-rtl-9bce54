// gold_code_gen -- one 5-bit Gold code generator.
//
// Two 5-stage Fibonacci LFSRs run side by side on the same clock. Register A
// follows the recurrence a(n+5) = a(n+2) ^ a(n) (polynomial x^5+x^2+1) and
// register B follows b(n+5) = b(n+4) ^ b(n+3) ^ b(n+2) ^ b(n)
// (x^5+x^4+x^3+x^2+1); the two form a preferred pair, so their XOR is a Gold
// code of period 2^5-1 = 31. Stage 0 of each register holds the current chip;
// 'data' is a[n] ^ b[n]. Different SEED_B values give different members of
// the Gold family. The register length follows the NCO test-pattern generator;
// the polynomials and seeds are this design's choice.
//
// Timing: 'data' changes after each rising edge of clk while en is high.
// rst_n (asynchronous, active low) loads the seeds.
module gold_code_gen #(
  parameter logic [4:0] SEED_A = 5'b00001,
  parameter logic [4:0] SEED_B = 5'b00001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic data
);

  logic [4:0] ra, rb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= SEED_A;
      rb <= SEED_B;
    end else if (en) begin
      ra <= {ra[2] ^ ra[0], ra[4:1]};
      rb <= {rb[4] ^ rb[3] ^ rb[2] ^ rb[0], rb[4:1]};
    end
  end

  assign data = ra[0] ^ rb[0];

endmodule
