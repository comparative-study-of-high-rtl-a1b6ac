// twod_bypass_mult: Braun multiplier with two-dimensional bypassing,
// p = a * b (unsigned).
//
// Same carry-save array as braun_mult. A cell can be skipped when its partial
// product a_i & b_j is 0, either because its row is idle (b_j = 0) or its
// column is idle (a_i = 0). A row-idle cell may still receive a carry from the
// cell above; then it must add, so the extra bypass circuitry tests that carry:
//   bypass(i,j) = ~(a_i & b_j) & ~carry_in(i,j)
// A bypassed cell's adder is isolated (inputs forced to 0), its sum input is
// forwarded and its carry output is 0, which is exact because 0 + s + 0 = s.
// `bypassed` flags, per cell (bit (j-1)*(N-1)+i), the isolated adders.
// Combinational. Bypassing by row or by column with a carry check follows the
// document; the exact per-cell condition and the isolation are this design's
// reading of it.
module twod_bypass_mult
  import braun_pkg::*;
#(
  parameter int unsigned  N           = 16,
  parameter final_adder_e FINAL_ADDER = ADD_CLA
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  output logic [2*N-1:0]         p,
  output logic [(N-1)*(N-1)-1:0] bypassed
);
  logic [N-1:0][N-1:0] s;
  logic [N-1:0][N-2:0] c;

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;
  assign p[0] = s[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N-2:0] fs, fc;

    assign s[j][N-1] = a[N-1] & b[j];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      logic pp, byp, act;
      assign pp  = a[i] & b[j];
      assign byp = ~pp & ~c[j-1][i];
      assign act = ~byp;
      full_adder u_fa (
        .a (pp),
        .b (s[j-1][i+1] & act),
        .ci(c[j-1][i]),  // is 0 whenever the cell is bypassed
        .s (fs[i]),
        .co(fc[i])
      );
      assign s[j][i]                   = byp ? s[j-1][i+1] : fs[i];
      assign c[j][i]                   = byp ? 1'b0 : fc[i];
      assign bypassed[(j-1)*(N-1) + i] = byp;
    end
    assign p[j] = s[j][0];
  end

  final_adder #(.W(N-1), .KIND(FINAL_ADDER)) u_last (
    .x   (s[N-1][N-1:1]),
    .y   (c[N-1]),
    .cin (1'b0),
    .sum (p[2*N-2:N]),
    .cout(p[2*N-1])
  );
endmodule
