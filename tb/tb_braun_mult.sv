// tb_braun_mult: self-checking testbench of braun_mult, the standard Braun array.
//
// Runs the multiplier at N = 4 and N = 8 with each of the three last-stage
// adders over every operand pair, and at N = 16 (once with default parameters,
// carry-lookahead, and once each with the ripple-carry and Kogge-Stone last
// stages) over corner operands and 20000 random pairs. Every product is
// compared with a * b computed by the simulator.
// A clock paces the vectors; a watchdog ends the run with a failure if it
// does not finish in time.
module tb_braun_mult;
  import braun_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] p4_rca;
  logic [7:0] p4_cla;
  logic [7:0] p4_ksa;
  logic [7:0] a8, b8;
  logic [15:0] p8_rca;
  logic [15:0] p8_cla;
  logic [15:0] p8_ksa;
  logic [15:0] a16, b16;
  logic [31:0] p16_rca;
  logic [31:0] p16_ksa;
  logic [31:0] p16_def;

  braun_mult #(.N(4), .FINAL_ADDER(ADD_RCA)) u_4_rca (.a(a4), .b(b4), .p(p4_rca));
  braun_mult #(.N(4), .FINAL_ADDER(ADD_CLA)) u_4_cla (.a(a4), .b(b4), .p(p4_cla));
  braun_mult #(.N(4), .FINAL_ADDER(ADD_KSA)) u_4_ksa (.a(a4), .b(b4), .p(p4_ksa));
  braun_mult #(.N(8), .FINAL_ADDER(ADD_RCA)) u_8_rca (.a(a8), .b(b8), .p(p8_rca));
  braun_mult #(.N(8), .FINAL_ADDER(ADD_CLA)) u_8_cla (.a(a8), .b(b8), .p(p8_cla));
  braun_mult #(.N(8), .FINAL_ADDER(ADD_KSA)) u_8_ksa (.a(a8), .b(b8), .p(p8_ksa));
  braun_mult #(.N(16), .FINAL_ADDER(ADD_RCA)) u_16_rca (.a(a16), .b(b16), .p(p16_rca));
  braun_mult #(.N(16), .FINAL_ADDER(ADD_KSA)) u_16_ksa (.a(a16), .b(b16), .p(p16_ksa));
  braun_mult u_16_def (.a(a16), .b(b16), .p(p16_def));

  task automatic check_4();
    if (p4_rca !== 8'(a4) * 8'(b4)) begin
      failures++;
      if (failures < 10) $display("FAIL 4_rca: %0d * %0d gave %0d", a4, b4, p4_rca);
    end
    checks++;
    if (p4_cla !== 8'(a4) * 8'(b4)) begin
      failures++;
      if (failures < 10) $display("FAIL 4_cla: %0d * %0d gave %0d", a4, b4, p4_cla);
    end
    checks++;
    if (p4_ksa !== 8'(a4) * 8'(b4)) begin
      failures++;
      if (failures < 10) $display("FAIL 4_ksa: %0d * %0d gave %0d", a4, b4, p4_ksa);
    end
    checks++;
  endtask

  task automatic check_8();
    if (p8_rca !== 16'(a8) * 16'(b8)) begin
      failures++;
      if (failures < 10) $display("FAIL 8_rca: %0d * %0d gave %0d", a8, b8, p8_rca);
    end
    checks++;
    if (p8_cla !== 16'(a8) * 16'(b8)) begin
      failures++;
      if (failures < 10) $display("FAIL 8_cla: %0d * %0d gave %0d", a8, b8, p8_cla);
    end
    checks++;
    if (p8_ksa !== 16'(a8) * 16'(b8)) begin
      failures++;
      if (failures < 10) $display("FAIL 8_ksa: %0d * %0d gave %0d", a8, b8, p8_ksa);
    end
    checks++;
  endtask

  task automatic check_16();
    if (p16_rca !== 32'(a16) * 32'(b16)) begin
      failures++;
      if (failures < 10) $display("FAIL 16_rca: %0d * %0d gave %0d", a16, b16, p16_rca);
    end
    checks++;
    if (p16_ksa !== 32'(a16) * 32'(b16)) begin
      failures++;
      if (failures < 10) $display("FAIL 16_ksa: %0d * %0d gave %0d", a16, b16, p16_ksa);
    end
    checks++;
    if (p16_def !== 32'(a16) * 32'(b16)) begin
      failures++;
      if (failures < 10) $display("FAIL 16_def: %0d * %0d gave %0d", a16, b16, p16_def);
    end
    checks++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a16 = '0; b16 = '0;
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
    for (int v = 0; v < 20100; v++) begin
      @(posedge clk);
      case (v)
        0: begin a16 = 16'hffff; b16 = 16'hffff; end
        1: begin a16 = 16'h0000; b16 = 16'hffff; end
        2: begin a16 = 16'hffff; b16 = 16'h0000; end
        3: begin a16 = 16'haaaa; b16 = 16'h5555; end
        4: begin a16 = 16'h5555; b16 = 16'haaaa; end
        5: begin a16 = 16'h8000; b16 = 16'h8000; end
        6: begin a16 = 16'hff00; b16 = 16'h00ff; end
        7: begin a16 = 16'h0001; b16 = 16'hffff; end
        default: begin
          a16 = 16'($urandom);
          b16 = 16'($urandom);
          // sparse operands exercise long bypass runs
          if (v % 4 == 1) a16 = a16 & 16'($urandom);
          if (v % 4 == 2) b16 = b16 & 16'($urandom);
          if (v < 100) begin a16 = 16'(1) << (v % 16); b16 = 16'(v * 2654435761); end
        end
      endcase
      #1 check_16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
