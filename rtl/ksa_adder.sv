// ksa_adder: W-bit Kogge-Stone parallel-prefix adder, sum = x + y + cin.
//
// The carry in is treated as a generate at position -1, so the prefix tree
// runs over W+1 (generate, propagate) pairs. Level l combines every position
// with the one 2^l places below it: (G, P) o (G', P') = (G | P&G', P&P'), for
// ceil(log2(W+1)) levels, after which position k holds the carry out of bit k-1
// (and position W the carry out). sum = (x ^ y) ^ carries. Combinational.
// The document names the adder only; this is the textbook radix-2 tree.
module ksa_adder #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned N1     = W + 1;
  localparam int unsigned LEVELS = $clog2(N1);

  // Position 0 holds cin; position k+1 holds bit k.
  logic [LEVELS:0][N1-1:0] gl, pl;

  assign gl[0] = {x & y, cin};
  assign pl[0] = {x ^ y, 1'b0};

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < N1; k++) begin : g_node
      if (k >= (1 << l)) begin : g_black
        assign gl[l+1][k] = gl[l][k] | (pl[l][k] & gl[l][k-(1<<l)]);
        assign pl[l+1][k] = pl[l][k] & pl[l][k-(1<<l)];
      end else begin : g_pass
        assign gl[l+1][k] = gl[l][k];
        assign pl[l+1][k] = pl[l][k];
      end
    end
  end

  // gl[LEVELS][k] is the carry into bit k (k = 0..W-1), [W] the carry out.
  assign sum  = pl[0][N1-1:1] ^ gl[LEVELS][W-1:0];
  assign cout = gl[LEVELS][W];
endmodule
