// tb_braun_full: braun_compare_top at its default size (16 x 16 bits).
//
// The top is instantiated with its default parameters. Corner operands and
// 12000 random pairs (a third with a sparse multiplicand, a third with a
// sparse multiplier, to get long bypass runs) are applied; all fifteen
// products are compared with a * b and the bypass flags checked as in
// tb_braun_compare_top. Each bypass mechanism is counted and must occur.
// A watchdog ends a stuck run.
module tb_braun_full;
  import braun_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint n_row_byp = 0, n_col_byp = 0, n_cell_byp = 0, n_carry_hold = 0, n_top_bit = 0;

  logic [15:0] a16, b16;
  logic [NUM_ARCHS-1:0][NUM_ADDERS-1:0][31:0] p16;
  logic [NUM_ARCHS-1:0][224:0] byp16;

  braun_compare_top u_top16 (.a(a16), .b(b16), .p(p16), .bypassed(byp16));

  task automatic check_16();
    localparam int N = 16;
    logic [2*N-1:0] ref_p;
    logic bad_row, bad_col, bad_cell;
    ref_p = (2*N)'(a16) * (2*N)'(b16);
    for (int ar = 0; ar < NUM_ARCHS; ar++)
      for (int f = 0; f < NUM_ADDERS; f++) begin
        checks++;
        if (p16[ar][f] !== ref_p) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d arch=%0d adder=%0d: %0d * %0d gave %0d", N, ar, f,
                     a16, b16, p16[ar][f]);
        end
      end
    if (ref_p[2*N-1]) n_top_bit++;
    bad_row = 1'b0; bad_col = 1'b0; bad_cell = 1'b0;
    checks++;
    if (byp16[ARCH_BRAUN] != '0) bad_cell = 1'b1;
    for (int j = 1; j < N; j++) begin
      if (!b16[j]) n_row_byp++;
      for (int i = 0; i < N - 1; i++) begin
        int k;
        k = (j - 1) * (N - 1) + i;
        if (byp16[ARCH_ROW][k] !== !b16[j]) bad_row = 1'b1;
        if (byp16[ARCH_COL][k] !== !a16[i]) bad_col = 1'b1;
        if (j == 1 && !a16[i]) n_col_byp++;
        for (int ar = int'(ARCH_2D); ar <= int'(ARCH_RC); ar++) begin
          if (!a16[i] && !byp16[ar][k]) bad_cell = 1'b1;
          if (a16[i] && b16[j] && byp16[ar][k]) bad_cell = 1'b1;
          if (a16[i] && !b16[j] && !byp16[ar][k]) n_carry_hold++;
          if (byp16[ar][k]) n_cell_byp++;
        end
      end
    end
    checks++;
    if (bad_row || bad_col || bad_cell) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d flags: row=%0d col=%0d cell=%0d", N, bad_row, bad_col, bad_cell);
    end
  endtask

  task automatic require(input longint count, input string what);
    checks++;
    $display("%-45s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int v = 0; v < 12000; v++) begin
      @(posedge clk);
      case (v)
        0: begin a16 = '1; b16 = '1; end
        1: begin a16 = '0; b16 = '1; end
        2: begin a16 = '1; b16 = '0; end
        3: begin a16 = {(16/2){2'b10}}; b16 = {(16/2){2'b01}}; end
        default: begin
          a16 = 16'($urandom);
          b16 = 16'($urandom);
          if (v % 3 == 1) a16 = a16 & 16'($urandom);
          if (v % 3 == 2) b16 = b16 & 16'($urandom);
        end
      endcase
      #1 check_16();
    end
    require(n_row_byp, "rows bypassed (b_j = 0)");
    require(n_col_byp, "columns bypassed (a_i = 0)");
    require(n_cell_byp, "2-D / row-column cells bypassed");
    require(n_carry_hold, "idle-row cells kept adding by a carry");
    require(n_top_bit, "products with the top bit from the carry out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
