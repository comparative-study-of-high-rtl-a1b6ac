// rc_bypass_mult: Braun multiplier with row and column bypassing and
// simplified adder cells, p = a * b (unsigned).
//
// Same carry-save array as braun_mult, with every full adder replaced by an
// rc_cell: where the partial product a_i & b_j is 1 the cell is an A+B+1
// adder, where it is 0 but a carry enters it is an A+1 incrementer, and where
// both are 0 (an idle row or column and no pending carry) it only forwards its
// sum input. Knowing the partial product in advance is what lets the full
// adder shrink to these cells. `bypassed` flags, per cell
// (bit (j-1)*(N-1)+i), the cells in the forwarding case. Combinational.
// The cell types follow the document; the choice between them is this
// design's own.
module rc_bypass_mult
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
    assign s[j][N-1] = a[N-1] & b[j];
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      rc_cell u_cell (
        .a     (s[j-1][i+1]),
        .b     (c[j-1][i]),
        .pp    (a[i] & b[j]),
        .s     (s[j][i]),
        .co    (c[j][i]),
        .bypass(bypassed[(j-1)*(N-1) + i])
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
