// tb_bypass_activity: switching activity of the five array architectures.
//
// Bypassing exists to cut dynamic power: an adder whose inputs are held does
// not switch. This testbench instantiates the five 16x16 multipliers with their
// default (carry-lookahead) last stage and applies 4000 random operand pairs,
// of which a third have a sparse multiplicand and a third a sparse multiplier.
// After each pair it counts, for every array cell, how many of the adder's
// outputs changed (sum and carry; the A+1 / A+B+1 cell's outputs for the
// row-and-column array). It checks:
//   * every product equals a * b;
//   * an isolated full adder (row, column and 2-D arrays) whose cell stays
//     bypassed from one pair to the next does not switch at all, and this
//     situation occurs.
// The toggle totals of the five arrays are printed for comparison. They are
// a switching count of the array cells only, not a power figure.
// A clock paces the vectors; a watchdog ends a stuck run with a failure.
module tb_bypass_activity;
  import braun_pkg::*;

  localparam int N  = 16;
  localparam int NC = (N - 1) * (N - 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic running = 1'b0;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p [NUM_ARCHS];
  logic [NC-1:0]  byp [NUM_ARCHS];

  braun_mult       u_braun (.a, .b, .p(p[ARCH_BRAUN]));
  row_bypass_mult  u_row   (.a, .b, .p(p[ARCH_ROW]), .bypassed(byp[ARCH_ROW]));
  col_bypass_mult  u_col   (.a, .b, .p(p[ARCH_COL]), .bypassed(byp[ARCH_COL]));
  twod_bypass_mult u_2d    (.a, .b, .p(p[ARCH_2D]),  .bypassed(byp[ARCH_2D]));
  rc_bypass_mult   u_rc    (.a, .b, .p(p[ARCH_RC]),  .bypassed(byp[ARCH_RC]));

  assign byp[ARCH_BRAUN] = '0;

  // Per-cell toggle counters and held-while-bypassed bookkeeping.
  int toggles [NUM_ARCHS][NC];
  int held    [NUM_ARCHS][NC];  // cell bypassed on two pairs in a row
  int held_sw [NUM_ARCHS][NC];  // ... and its isolated adder switched anyway

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_col
      localparam int K = (j - 1) * (N - 1) + i;
      logic [1:0] cur [NUM_ARCHS];
      logic [1:0] prev [NUM_ARCHS];
      logic       prev_byp [NUM_ARCHS];

      assign cur[ARCH_BRAUN] = {u_braun.g_row[j].g_col[i].u_fa.s, u_braun.g_row[j].g_col[i].u_fa.co};
      assign cur[ARCH_ROW]   = {u_row.g_row[j].g_col[i].u_fa.s,   u_row.g_row[j].g_col[i].u_fa.co};
      assign cur[ARCH_COL]   = {u_col.g_row[j].g_col[i].u_fa.s,   u_col.g_row[j].g_col[i].u_fa.co};
      assign cur[ARCH_2D]    = {u_2d.g_row[j].g_col[i].u_fa.s,    u_2d.g_row[j].g_col[i].u_fa.co};
      assign cur[ARCH_RC]    = {u_rc.g_row[j].g_col[i].u_cell.s,  u_rc.g_row[j].g_col[i].u_cell.co};

      initial begin
        for (int ar = 0; ar < NUM_ARCHS; ar++) begin
          toggles[ar][K] = 0;
          held[ar][K]    = 0;
          held_sw[ar][K] = 0;
          prev[ar]       = '0;
          prev_byp[ar]   = 1'b0;
        end
      end

      always @(negedge clk) begin
        if (running) begin
          for (int ar = 0; ar < NUM_ARCHS; ar++) begin
            toggles[ar][K] += $countones(cur[ar] ^ prev[ar]);
            if (ar != int'(ARCH_RC) && prev_byp[ar] && byp[ar][K]) begin
              held[ar][K]++;
              if (cur[ar] != prev[ar]) held_sw[ar][K]++;
            end
          end
        end
        for (int ar = 0; ar < NUM_ARCHS; ar++) begin
          prev[ar]     = cur[ar];
          prev_byp[ar] = byp[ar][K];
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint tot [NUM_ARCHS];
    longint n_held, n_held_sw;
    a = '0;
    b = '0;
    @(posedge clk);  // first sample only records the starting state
    @(posedge clk);
    running = 1'b1;
    for (int v = 0; v < 4000; v++) begin
      a = N'($urandom);
      b = N'($urandom);
      if (v % 3 == 1) a = a & N'($urandom) & N'($urandom);
      if (v % 3 == 2) b = b & N'($urandom) & N'($urandom);
      #1;
      for (int ar = 0; ar < NUM_ARCHS; ar++) begin
        checks++;
        if (p[ar] !== (2*N)'(a) * (2*N)'(b)) begin
          failures++;
          if (failures < 10) $display("FAIL arch=%0d: %0d * %0d gave %0d", ar, a, b, p[ar]);
        end
      end
      @(posedge clk);
    end
    @(negedge clk);
    running = 1'b0;
    n_held = 0;
    n_held_sw = 0;
    for (int ar = 0; ar < NUM_ARCHS; ar++) begin
      tot[ar] = 0;
      for (int k = 0; k < NC; k++) begin
        tot[ar] += longint'(toggles[ar][k]);
        n_held += longint'(held[ar][k]);
        n_held_sw += longint'(held_sw[ar][k]);
      end
    end
    checks++;
    if (n_held == 0) begin
      failures++;
      $display("FAIL: no cell stayed bypassed across two operand pairs");
    end
    checks++;
    if (n_held_sw != 0) begin
      failures++;
      $display("FAIL: %0d isolated adders switched while bypassed", n_held_sw);
    end
    $display("cell-pairs held bypassed: %0d, of which switched: %0d", n_held, n_held_sw);
    $display("array cell output toggles over 4000 pairs (N = %0d):", N);
    $display("  standard Braun          %0d", tot[ARCH_BRAUN]);
    $display("  row bypassing           %0d", tot[ARCH_ROW]);
    $display("  column bypassing        %0d", tot[ARCH_COL]);
    $display("  2-D bypassing           %0d", tot[ARCH_2D]);
    $display("  row-and-column (cells)  %0d", tot[ARCH_RC]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
