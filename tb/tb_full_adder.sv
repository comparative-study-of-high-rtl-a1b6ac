// tb_full_adder: self-checking testbench of full_adder.
//
// Applies all eight input combinations, twice, and checks that
// 2*co + s equals a + b + ci. A watchdog ends a stuck run with a failure.
module tb_full_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic a, b, ci, s, co;

  full_adder u_dut (.a, .b, .ci, .s, .co);

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
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== 2'(a) + 2'(b) + 2'(ci)) begin
        failures++;
        $display("FAIL: %0d+%0d+%0d gave co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
