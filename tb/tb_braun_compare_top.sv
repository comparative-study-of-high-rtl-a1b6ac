// tb_braun_compare_top: end-to-end testbench of braun_compare_top.
//
// Builds the top at N = 4 and N = 8 and applies every operand pair to each.
// All fifteen products (five array architectures x three last-stage adders)
// are compared with a * b. The bypass flags are checked: a row-bypassing cell
// is bypassed exactly when b_j = 0, a column-bypassing cell exactly when
// a_i = 0, 2-D and row-and-column cells always in an idle column and never
// where a_i & b_j = 1, and the standard array reports none. Each mechanism
// (row bypass, column bypass, cell bypass, a carry keeping an idle-row cell
// busy, a product whose top bit is the last stage's carry out) is counted and
// the run fails if one never happened. A watchdog ends a stuck run.
module tb_braun_compare_top;
  import braun_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  longint n_row_byp = 0, n_col_byp = 0, n_cell_byp = 0, n_carry_hold = 0, n_top_bit = 0;

  logic [3:0] a4, b4;
  logic [NUM_ARCHS-1:0][NUM_ADDERS-1:0][7:0] p4;
  logic [NUM_ARCHS-1:0][8:0] byp4;
  logic [7:0] a8, b8;
  logic [NUM_ARCHS-1:0][NUM_ADDERS-1:0][15:0] p8;
  logic [NUM_ARCHS-1:0][48:0] byp8;

  braun_compare_top #(.N(4)) u_top4 (.a(a4), .b(b4), .p(p4), .bypassed(byp4));
  braun_compare_top #(.N(8)) u_top8 (.a(a8), .b(b8), .p(p8), .bypassed(byp8));

  task automatic check_4();
    localparam int N = 4;
    logic [2*N-1:0] ref_p;
    logic bad_row, bad_col, bad_cell;
    ref_p = (2*N)'(a4) * (2*N)'(b4);
    for (int ar = 0; ar < NUM_ARCHS; ar++)
      for (int f = 0; f < NUM_ADDERS; f++) begin
        checks++;
        if (p4[ar][f] !== ref_p) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d arch=%0d adder=%0d: %0d * %0d gave %0d", N, ar, f,
                     a4, b4, p4[ar][f]);
        end
      end
    if (ref_p[2*N-1]) n_top_bit++;
    bad_row = 1'b0; bad_col = 1'b0; bad_cell = 1'b0;
    checks++;
    if (byp4[ARCH_BRAUN] != '0) bad_cell = 1'b1;
    for (int j = 1; j < N; j++) begin
      if (!b4[j]) n_row_byp++;
      for (int i = 0; i < N - 1; i++) begin
        int k;
        k = (j - 1) * (N - 1) + i;
        if (byp4[ARCH_ROW][k] !== !b4[j]) bad_row = 1'b1;
        if (byp4[ARCH_COL][k] !== !a4[i]) bad_col = 1'b1;
        if (j == 1 && !a4[i]) n_col_byp++;
        for (int ar = int'(ARCH_2D); ar <= int'(ARCH_RC); ar++) begin
          if (!a4[i] && !byp4[ar][k]) bad_cell = 1'b1;
          if (a4[i] && b4[j] && byp4[ar][k]) bad_cell = 1'b1;
          if (a4[i] && !b4[j] && !byp4[ar][k]) n_carry_hold++;
          if (byp4[ar][k]) n_cell_byp++;
        end
      end
    end
    checks++;
    if (bad_row || bad_col || bad_cell) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d flags: row=%0d col=%0d cell=%0d", N, bad_row, bad_col, bad_cell);
    end
  endtask

  task automatic check_8();
    localparam int N = 8;
    logic [2*N-1:0] ref_p;
    logic bad_row, bad_col, bad_cell;
    ref_p = (2*N)'(a8) * (2*N)'(b8);
    for (int ar = 0; ar < NUM_ARCHS; ar++)
      for (int f = 0; f < NUM_ADDERS; f++) begin
        checks++;
        if (p8[ar][f] !== ref_p) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d arch=%0d adder=%0d: %0d * %0d gave %0d", N, ar, f,
                     a8, b8, p8[ar][f]);
        end
      end
    if (ref_p[2*N-1]) n_top_bit++;
    bad_row = 1'b0; bad_col = 1'b0; bad_cell = 1'b0;
    checks++;
    if (byp8[ARCH_BRAUN] != '0) bad_cell = 1'b1;
    for (int j = 1; j < N; j++) begin
      if (!b8[j]) n_row_byp++;
      for (int i = 0; i < N - 1; i++) begin
        int k;
        k = (j - 1) * (N - 1) + i;
        if (byp8[ARCH_ROW][k] !== !b8[j]) bad_row = 1'b1;
        if (byp8[ARCH_COL][k] !== !a8[i]) bad_col = 1'b1;
        if (j == 1 && !a8[i]) n_col_byp++;
        for (int ar = int'(ARCH_2D); ar <= int'(ARCH_RC); ar++) begin
          if (!a8[i] && !byp8[ar][k]) bad_cell = 1'b1;
          if (a8[i] && b8[j] && byp8[ar][k]) bad_cell = 1'b1;
          if (a8[i] && !b8[j] && !byp8[ar][k]) n_carry_hold++;
          if (byp8[ar][k]) n_cell_byp++;
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
    a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        @(posedge clk);
        a4 = 4'(x); b4 = 4'(y);
        #1 check_4();
      end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        @(posedge clk);
        a8 = 8'(x); b8 = 8'(y);
        #1 check_8();
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
