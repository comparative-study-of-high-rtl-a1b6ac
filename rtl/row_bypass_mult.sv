// row_bypass_mult: Braun multiplier with row bypassing, p = a * b (unsigned).
//
// Same carry-save array as braun_mult, but when multiplier bit b_j is 0 the
// whole row j adds nothing, so its full adders are isolated (their inputs are
// forced to 0 and stop toggling) and multiplexers hand the outputs of row j-1
// straight to row j+1. To stay exact, a bypassed row shifts both the sum and
// the carry vector of the row above one column right (which keeps every bit at
// its weight). The two bits that then meet in column 0, together with a pending
// edge carry, are added by a per-row correction full adder at the right edge:
//   b_j = 1: column-0 adder gives s', correction adds s' + k(j-1)
//   b_j = 0: correction adds sum(j-1, col 1) + carry(j-1, col 0) + k(j-1)
// It produces product bit j and the edge carry k(j), which goes to the next
// row's correction adder; k(N-1) enters the last-stage adder as its carry in.
// `bypassed` flags, per cell (bit (j-1)*(N-1)+i), the isolated adders.
// Combinational. Row bypassing on b_j follows the document; the way the carry
// of a bypassed row is kept exact (the edge correction adders) is this
// design's own, as is the AND-gate isolation.
module row_bypass_mult
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
  logic [N-1:0]        k;  // edge carry leaving row j, weight j+1

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;
  assign k[0] = 1'b0;
  assign p[0] = s[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic               byp;
    logic [N-2:0]       fs, fc;  // full-adder outputs
    logic               corr_a, corr_ci;

    assign byp       = ~b[j];
    assign s[j][N-1] = a[N-1] & b[j];

    for (genvar i = 0; i < N - 1; i++) begin : g_col
      // operand isolation: a bypassed cell sees constant zero inputs
      full_adder u_fa (
        .a (a[i] & b[j]),
        .b (s[j-1][i+1] & b[j]),
        .ci(c[j-1][i] & b[j]),
        .s (fs[i]),
        .co(fc[i])
      );
      assign s[j][i]                   = byp ? s[j-1][i+1] : fs[i];
      // bypassed: carries of row j-1 shifted right by one column
      if (i < N - 2) begin : g_cfwd
        assign c[j][i] = byp ? c[j-1][i+1] : fc[i];
      end else begin : g_ctop
        assign c[j][i] = byp ? 1'b0 : fc[i];
      end
      assign bypassed[(j-1)*(N-1) + i] = byp;
    end

    // Right-edge correction adder.
    assign corr_a  = byp ? s[j-1][1] : fs[0];
    assign corr_ci = byp ? c[j-1][0] : 1'b0;
    full_adder u_corr (
      .a (corr_a),
      .b (k[j-1]),
      .ci(corr_ci),
      .s (p[j]),
      .co(k[j])
    );
  end

  final_adder #(.W(N-1), .KIND(FINAL_ADDER)) u_last (
    .x   (s[N-1][N-1:1]),
    .y   (c[N-1]),
    .cin (k[N-1]),
    .sum (p[2*N-2:N]),
    .cout(p[2*N-1])
  );
endmodule
