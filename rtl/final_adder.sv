// final_adder: last stage of a Braun-family multiplier, one of three adders.
//
// Chooses at elaboration time, by the KIND parameter, the ripple-carry,
// carry-lookahead or Kogge-Stone adder and computes sum = x + y + cin on W bits
// with a carry out. Combinational. The default is the carry-lookahead adder,
// which the study finds the best balance of area, delay and power.
module final_adder
  import braun_pkg::*;
#(
  parameter int unsigned  W    = 15,
  parameter final_adder_e KIND = ADD_CLA
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  if (KIND == ADD_RCA) begin : g_rca
    rca_adder #(.W(W)) u_add (.x, .y, .cin, .sum, .cout);
  end else if (KIND == ADD_KSA) begin : g_ksa
    ksa_adder #(.W(W)) u_add (.x, .y, .cin, .sum, .cout);
  end else begin : g_cla
    cla_adder #(.W(W)) u_add (.x, .y, .cin, .sum, .cout);
  end
endmodule
