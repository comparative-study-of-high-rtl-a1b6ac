// braun_compare_top: the fifteen multiplier variants of the study side by side.
//
// Five Braun-family array architectures (standard, row bypassing, column
// bypassing, two-dimensional bypassing, row-and-column bypassing), each built
// with each of the three last-stage adders (ripple-carry, carry-lookahead,
// Kogge-Stone), all multiplying the same unsigned operands a and b.
// p[arch][adder] is the 2N-bit product of one variant, indexed by arch_e and
// final_adder_e of braun_pkg; every entry equals a * b. bypassed[arch] holds the
// per-cell bypass flags of the carry-lookahead variant of each architecture
// (the bypass decisions do not depend on the last stage; the standard array
// has none, so its entry is 0). Purely combinational.
// The set of variants is the study's; putting them on shared inputs is this
// design's arrangement for comparing them.
module braun_compare_top
  import braun_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                               a,
  input  logic [N-1:0]                               b,
  output logic [NUM_ARCHS-1:0][NUM_ADDERS-1:0][2*N-1:0] p,
  output logic [NUM_ARCHS-1:0][(N-1)*(N-1)-1:0]       bypassed
);
  localparam final_adder_e KINDS[NUM_ADDERS] = '{ADD_RCA, ADD_CLA, ADD_KSA};

  for (genvar f = 0; f < NUM_ADDERS; f++) begin : g_adder
    logic [NUM_ARCHS-1:0][(N-1)*(N-1)-1:0] byp;

    braun_mult #(.N(N), .FINAL_ADDER(KINDS[f])) u_braun (
      .a, .b, .p(p[ARCH_BRAUN][f])
    );
    assign byp[ARCH_BRAUN] = '0;
    row_bypass_mult #(.N(N), .FINAL_ADDER(KINDS[f])) u_row (
      .a, .b, .p(p[ARCH_ROW][f]), .bypassed(byp[ARCH_ROW])
    );
    col_bypass_mult #(.N(N), .FINAL_ADDER(KINDS[f])) u_col (
      .a, .b, .p(p[ARCH_COL][f]), .bypassed(byp[ARCH_COL])
    );
    twod_bypass_mult #(.N(N), .FINAL_ADDER(KINDS[f])) u_2d (
      .a, .b, .p(p[ARCH_2D][f]), .bypassed(byp[ARCH_2D])
    );
    rc_bypass_mult #(.N(N), .FINAL_ADDER(KINDS[f])) u_rc (
      .a, .b, .p(p[ARCH_RC][f]), .bypassed(byp[ARCH_RC])
    );
  end

  assign bypassed = g_adder[ADD_CLA].byp;
endmodule
