// braun_mult: standard Braun (carry-save array) unsigned multiplier, p = a * b.
//
// Row 0 is the partial-product row a_i & b_0. Each following row j (1..N-1)
// has N-1 full adders; the adder in column i adds a_i & b_j, the sum of column
// i+1 of the row above (weight i+j) and the carry of column i of the row above
// (weight i+j). Sums move one column right per row, carries stay in their
// column, and the column-0 sum of row j is product bit j. After the last row
// the N-1 remaining sums and N-1 carries are merged by the last-stage adder
// (final_adder, ripple-carry, carry-lookahead or Kogge-Stone) into product bits
// N..2N-1. This uses N*N AND gates and (N-1)*(N-1) array full adders, plus the
// N-1 bit last stage. Purely combinational: no clock, no reset.
// The array follows the document; replacing the ripple-carry last stage by a
// faster adder is the document's proposal; the default (carry-lookahead) is
// the adder its conclusion favours.
module braun_mult
  import braun_pkg::*;
#(
  parameter int unsigned  N           = 16,
  parameter final_adder_e FINAL_ADDER = ADD_CLA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // s[j][i]: sum leaving row j in column i; c[j][i]: carry leaving row j, column i.
  logic [N-1:0][N-1:0] s;
  logic [N-1:0][N-2:0] c;

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;
  assign p[0] = s[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    assign s[j][N-1] = a[N-1] & b[j];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      full_adder u_fa (
        .a (a[i] & b[j]),
        .b (s[j-1][i+1]),
        .ci(c[j-1][i]),
        .s (s[j][i]),
        .co(c[j][i])
      );
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
