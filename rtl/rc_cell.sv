// rc_cell: simplified adder cell of the row-and-column bypassing multiplier.
//
// A full adder whose third input is the partial product pp = a_i & b_j is
// replaced by three cheaper behaviours, chosen by pp and the carry input:
//   pp = 1            : A+B+1 adder  s = ~(a ^ b), co = a | b
//   pp = 0, carry = 1 : A+1 incrementer on a, s = ~a, co = a
//   pp = 0, carry = 0 : bypass, s = a, co = 0
// a is the sum input from the row above, b the carry input. `bypass` is 1 in
// the third case. Each case equals a + b + pp, so the cell is exact.
// Combinational. The A+1 and A+B+1 cells follow the document; the rule that
// chooses between them is this design's own.
module rc_cell (
  input  logic a,
  input  logic b,
  input  logic pp,
  output logic s,
  output logic co,
  output logic bypass
);
  logic abp1_s, abp1_co;  // A+B+1 adder
  logic inc_s, inc_co;    // A+1 incrementer

  always_comb begin
    abp1_s  = ~(a ^ b);
    abp1_co = a | b;
    inc_s   = ~a;
    inc_co  = a;
    bypass  = ~pp & ~b;
    if (pp) begin
      s  = abp1_s;
      co = abp1_co;
    end else if (b) begin
      s  = inc_s;
      co = inc_co;
    end else begin
      s  = a;
      co = 1'b0;
    end
  end
endmodule
