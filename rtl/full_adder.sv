// full_adder: one-bit full adder, the basic cell of the Braun array and of the
// ripple-carry last stage.
//
// s = a ^ b ^ ci, co = majority(a, b, ci). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic axb;

  always_comb begin
    axb = a ^ b;
    s   = axb ^ ci;
    co  = (a & b) | (ci & axb);
  end
endmodule
