// rca_adder: W-bit ripple-carry adder, sum = x + y + cin.
//
// A chain of W full adders; the carry out of bit k is the carry in of bit k+1,
// so the delay grows linearly with W. It is the last stage of the original
// Braun-family multipliers and the baseline the faster adders replace.
// Combinational; cout is the carry out of the top bit.
module rca_adder #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a (x[k]),
      .b (y[k]),
      .ci(c[k]),
      .s (sum[k]),
      .co(c[k+1])
    );
  end

  assign cout = c[W];
endmodule
