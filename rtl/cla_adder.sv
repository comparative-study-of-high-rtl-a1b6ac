// cla_adder: W-bit two-level carry-lookahead adder, sum = x + y + cin.
//
// Bits are split into groups of CLA_GROUP (4) bits. Inside a group every carry
// is computed directly from the bit generate g = x&y and propagate p = x^y
// signals and the group's carry in (first level). Each group also forms a group
// generate G and propagate P, and the second level computes the carry into
// every group directly as the OR over earlier groups k of G_k AND the P of all
// groups between, plus cin AND all P: no carry ripples from group to group.
// The last group may be narrower than CLA_GROUP. Combinational.
// The document names the adder only; group size and the two-level form are
// this design's choice.
module cla_adder
  import braun_pkg::*;
#(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned GS = CLA_GROUP;
  localparam int unsigned NG = (W + GS - 1) / GS;

  logic [W-1:0]  g, p;
  logic [NG-1:0] gg, gp;  // group generate / propagate
  logic [NG:0]   gc;      // carry into each group, gc[NG] = cout
  logic [W-1:0]  c;       // carry into each bit

  assign g = x & y;
  assign p = x ^ y;

  // Group generate and propagate.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int unsigned b = k * GS; b < k * GS + GS && b < W; b++) begin
        gg[k] = g[b] | (p[b] & gg[k]);
        gp[k] = gp[k] & p[b];
      end
    end
  end

  // Second level: every group carry as a sum of products.
  always_comb begin
    for (int unsigned k = 0; k <= NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      // contribution of cin
      term = cin;
      for (int unsigned m = 0; m < k; m++) term = term & gp[m];
      gc[k] = gc[k] | term;
      // contribution of each earlier group's generate
      for (int unsigned j = 0; j < k; j++) begin
        term = gg[j];
        for (int unsigned m = j + 1; m < k; m++) term = term & gp[m];
        gc[k] = gc[k] | term;
      end
    end
  end

  // First level: every bit carry inside a group as a sum of products.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      for (int unsigned b = k * GS; b < k * GS + GS && b < W; b++) begin
        logic term;
        term = gc[k];
        for (int unsigned m = k * GS; m < b; m++) term = term & p[m];
        c[b] = term;
        for (int unsigned j = k * GS; j < b; j++) begin
          term = g[j];
          for (int unsigned m = j + 1; m < b; m++) term = term & p[m];
          c[b] = c[b] | term;
        end
      end
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[NG];
endmodule
