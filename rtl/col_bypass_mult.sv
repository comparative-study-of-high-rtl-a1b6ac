// col_bypass_mult: Braun multiplier with column bypassing, p = a * b (unsigned).
//
// Same carry-save array as braun_mult. Carries run straight down a column, so
// when multiplicand bit a_i is 0 the column never holds a carry and each of its
// adders would only pass its sum input through. Those adders are isolated
// (inputs forced to 0) and a multiplexer forwards the sum input; the carry
// output is forced to 0. No correction at the last stage is needed.
// `bypassed` flags, per cell (bit (j-1)*(N-1)+i), the isolated adders.
// Combinational. Bypassing on a_i follows the document; the AND-gate isolation
// is this design's choice.
module col_bypass_mult
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
      logic byp;
      assign byp = ~a[i];
      full_adder u_fa (
        .a (a[i] & b[j]),
        .b (s[j-1][i+1] & a[i]),
        .ci(c[j-1][i] & a[i]),
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
