// cla_adder -- W-bit carry-lookahead adder with carry in and carry out.
//
// Used for every addition in the NCO: one per 8-bit section of the pipelined
// phase accumulator and one in the phase modulator. Each bit forms a generate
// (a&b) and a propagate (a^b) term; the carry into bit i is computed directly
// as the OR of every generate below it ANDed with all propagates between,
// plus cin ANDed with all propagates below i, so no carry ripples from bit to
// bit. The NCO uses a captured-schematic CLA adder of this kind; its gate
// arrangement is not given, so this flat one-level lookahead is this design's
// choice. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // Carry into bit i, expanded fully in terms of g, p and cin.
  function automatic logic lookahead(input logic [W-1:0] gv, input logic [W-1:0] pv,
                                     input logic ci, input int i);
    logic cy, term;
    term = ci;
    for (int k = 0; k < i; k++) term = term & pv[k];
    cy = term;
    for (int j = 0; j < i; j++) begin
      term = gv[j];
      for (int k = j + 1; k < i; k++) term = term & pv[k];
      cy = cy | term;
    end
    return cy;
  endfunction

  for (genvar i = 0; i <= W; i++) begin : g_carry
    assign c[i] = lookahead(g, p, cin, i);
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
