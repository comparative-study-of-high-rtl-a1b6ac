// tb_rc_cell: self-checking testbench of rc_cell, the A+1 / A+B+1 / bypass
// cell of the row-and-column bypassing multiplier.
//
// Applies all eight combinations of (sum in a, carry in b, partial product pp)
// and checks that 2*co + s equals a + b + pp, and that the cell reports bypass
// exactly when pp = 0 and b = 0 (and then passes a with carry 0). Counts each
// of the three cell modes and fails if one never occurred.
module tb_rc_cell;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_abp1 = 0, n_inc = 0, n_pass = 0;
  logic a, b, pp, s, co, bypass;

  rc_cell u_dut (.a, .b, .pp, .s, .co, .bypass);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      @(posedge clk);
      {a, b, pp} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(a) + 2'(b) + 2'(pp)) begin
        failures++;
        $display("FAIL: %0d+%0d+%0d gave co=%0d s=%0d", a, b, pp, co, s);
      end
      checks++;
      if (bypass !== (!pp && !b) || (bypass && (s !== a || co !== 1'b0))) begin
        failures++;
        $display("FAIL: bypass=%0d for a=%0d b=%0d pp=%0d", bypass, a, b, pp);
      end
      if (pp) n_abp1++;
      else if (b) n_inc++;
      else n_pass++;
    end
    checks++;
    if (n_abp1 == 0 || n_inc == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL: a cell mode never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
