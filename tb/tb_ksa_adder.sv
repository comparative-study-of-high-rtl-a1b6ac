// tb_ksa_adder: self-checking testbench of the Kogge-Stone last-stage adder ksa_adder.
//
// Checks sum and carry out against x + y + cin computed by the simulator, at
// the default width (15, the last stage of a 16x16 multiplier) and at widths
// 1 to 31, over corner operands (all ones, alternating bits, long carry
// propagation) and random operands, each with cin = 0 and 1. Counts how often
// the carry out was set and how often a carry crossed the whole adder, and
// fails if either never happened. A watchdog ends a stuck run with a failure.
module tb_ksa_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_cout = 0;
  int n_full_prop = 0;
  logic cin;
  logic [15:0] r16;
  logic [31:0] rx, ry;
  logic [14:0] x15, y15, s15;
  logic c15;
  logic [0:0] x1w, y1w, s1w;
  logic c1w;
  logic [1:0] x2w, y2w, s2w;
  logic c2w;
  logic [2:0] x3w, y3w, s3w;
  logic c3w;
  logic [3:0] x4w, y4w, s4w;
  logic c4w;
  logic [4:0] x5w, y5w, s5w;
  logic c5w;
  logic [7:0] x8w, y8w, s8w;
  logic c8w;
  logic [15:0] x16w, y16w, s16w;
  logic c16w;
  logic [30:0] x31w, y31w, s31w;
  logic c31w;

  ksa_adder u_def (.x(x15), .y(y15), .cin(cin), .sum(s15), .cout(c15));
  ksa_adder #(.W(1)) u_w1 (.x(x1w), .y(y1w), .cin(cin), .sum(s1w), .cout(c1w));
  ksa_adder #(.W(2)) u_w2 (.x(x2w), .y(y2w), .cin(cin), .sum(s2w), .cout(c2w));
  ksa_adder #(.W(3)) u_w3 (.x(x3w), .y(y3w), .cin(cin), .sum(s3w), .cout(c3w));
  ksa_adder #(.W(4)) u_w4 (.x(x4w), .y(y4w), .cin(cin), .sum(s4w), .cout(c4w));
  ksa_adder #(.W(5)) u_w5 (.x(x5w), .y(y5w), .cin(cin), .sum(s5w), .cout(c5w));
  ksa_adder #(.W(8)) u_w8 (.x(x8w), .y(y8w), .cin(cin), .sum(s8w), .cout(c8w));
  ksa_adder #(.W(16)) u_w16 (.x(x16w), .y(y16w), .cin(cin), .sum(s16w), .cout(c16w));
  ksa_adder #(.W(31)) u_w31 (.x(x31w), .y(y31w), .cin(cin), .sum(s31w), .cout(c31w));

  task automatic check_all();
    r16 = 16'(x15) + 16'(y15) + 16'(cin);
    checks++;
    if ({c15, s15} !== r16) begin
      failures++;
      if (failures < 10) $display("FAIL W=15: %0h + %0h + %0d gave %0h", x15, y15, cin, {c15, s15});
    end
    checks++;
    if ({c1w, s1w} !== 2'(x1w) + 2'(y1w) + 2'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=1: %0h + %0h + %0d gave %0h", x1w, y1w, cin, {c1w, s1w});
    end
    checks++;
    if ({c2w, s2w} !== 3'(x2w) + 3'(y2w) + 3'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=2: %0h + %0h + %0d gave %0h", x2w, y2w, cin, {c2w, s2w});
    end
    checks++;
    if ({c3w, s3w} !== 4'(x3w) + 4'(y3w) + 4'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=3: %0h + %0h + %0d gave %0h", x3w, y3w, cin, {c3w, s3w});
    end
    checks++;
    if ({c4w, s4w} !== 5'(x4w) + 5'(y4w) + 5'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=4: %0h + %0h + %0d gave %0h", x4w, y4w, cin, {c4w, s4w});
    end
    checks++;
    if ({c5w, s5w} !== 6'(x5w) + 6'(y5w) + 6'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=5: %0h + %0h + %0d gave %0h", x5w, y5w, cin, {c5w, s5w});
    end
    checks++;
    if ({c8w, s8w} !== 9'(x8w) + 9'(y8w) + 9'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=8: %0h + %0h + %0d gave %0h", x8w, y8w, cin, {c8w, s8w});
    end
    checks++;
    if ({c16w, s16w} !== 17'(x16w) + 17'(y16w) + 17'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=16: %0h + %0h + %0d gave %0h", x16w, y16w, cin, {c16w, s16w});
    end
    checks++;
    if ({c31w, s31w} !== 32'(x31w) + 32'(y31w) + 32'(cin)) begin
      failures++;
      if (failures < 10) $display("FAIL W=31: %0h + %0h + %0d gave %0h", x31w, y31w, cin, {c31w, s31w});
    end
    if (c15) n_cout++;
    if ((x15 ^ y15) == 15'h7fff && cin) n_full_prop++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cin = 1'b0;
    rx = '0;
    ry = '0;
    for (int v = 0; v < 40000; v++) begin
      @(posedge clk);
      case (v / 2)
        0: begin rx = '1; ry = '0; end
        1: begin rx = '1; ry = '1; end
        2: begin rx = 32'haaaaaaaa; ry = 32'h55555555; end
        3: begin rx = '0; ry = '0; end
        4: begin rx = 32'h1; ry = '1; end
        default: begin rx = $urandom; ry = $urandom; end
      endcase
      // every fourth random vector: y = ~x, so a carry in crosses every bit
      if (v > 12 && v % 4 == 0) ry = ~rx;
      cin = v[0];
      x1w = 1'(rx); y1w = 1'(ry);
      x2w = 2'(rx); y2w = 2'(ry);
      x3w = 3'(rx); y3w = 3'(ry);
      x4w = 4'(rx); y4w = 4'(ry);
      x5w = 5'(rx); y5w = 5'(ry);
      x8w = 8'(rx); y8w = 8'(ry);
      x16w = 16'(rx); y16w = 16'(ry);
      x31w = 31'(rx); y31w = 31'(ry);
      x15 = 15'(rx); y15 = 15'(ry);
      #1 check_all();
    end
    checks++;
    if (n_cout == 0) begin failures++; $display("FAIL: carry out never set"); end
    checks++;
    if (n_full_prop == 0) begin failures++; $display("FAIL: no full-length carry"); end
    $display("carry out set %0d times, full-length carries %0d", n_cout, n_full_prop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
