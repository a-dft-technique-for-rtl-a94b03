// Test of the arithmetic unit at 1.5 GHz, then at 200 MHz: random additions and
// subtractions, including long carry chains. The operands are applied
// while CLK=0; after the falling edge the held half-sums and carries must
// give A + B (or A - B) and the carry out. At 200 MHz the test then closes the footer
// of section 1 (230 ps) and of section 2 (390 ps) as the DFT logic would:
// the good unit still meets both windows, a shorter section 1 window (120
// ps) leaves all carries and half-sums at zero.
module tb_arithmetic_unit;
  timeunit 1ps; timeprecision 1ps;

  int unsigned checks = 0, failures = 0;
  logic        clk = 1'b0;
  logic [31:0] a_bus = '0, b_bus = '0, p_hold, c_hold;
  logic        sub = 1'b0, tclk1 = 1'b1, tclk2 = 1'b1, cout;
  int unsigned win1 = 0, win2 = 0;   // 0 = footer always on

  int unsigned half_ps = 333;  // 1.5 GHz; TEST mode windows at 200 MHz
  always #(half_ps) clk = ~clk;

  arithmetic_unit dut (.clk, .a_bus, .b_bus, .sub, .test_clk1(tclk1), .test_clk2(tclk2),
                       .p_hold, .c_hold, .cout_hold(cout));

  // footers: off win ps after the rising edge, back on at the falling edge
  always @(posedge clk) begin
    if (win1 != 0) tclk1 <= #(win1) 1'b0;
    if (win2 != 0) tclk2 <= #(win2) 1'b0;
  end
  always @(negedge clk) begin
    tclk1 <= 1'b1;
    tclk2 <= 1'b1;
  end

  function automatic logic [31:0] operand();
    case ($urandom_range(0, 2))
      0: return 32'hFFFF_FFFF >> $urandom_range(0, 31);
      1: return ~(32'hFFFF_FFFF >> $urandom_range(0, 31));
      default: return $urandom();
    endcase
  endfunction

  task automatic one(input logic [31:0] a, input logic [31:0] b, input logic s,
                     input bit expect_zero);
    logic [32:0] e;
    @(negedge clk); #10;
    a_bus = a; b_bus = b; sub = s;
    e = s ? ({1'b0, a} + {1'b0, ~b} + 33'd1) : ({1'b0, a} + {1'b0, b});
    @(negedge clk); #50;
    checks++;
    if (expect_zero) begin
      if (p_hold !== '0 || c_hold !== '0) begin failures++; $display("FAIL window too short but evaluated"); end
    end else if ((p_hold ^ c_hold) !== e[31:0] || cout !== e[32]) begin
      failures++;
      $display("FAIL %h %s %h = %h (cout %b), expected %h (%b)", a, s ? "-" : "+", b,
               p_hold ^ c_hold, cout, e[31:0], e[32]);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) one(operand(), operand(), 1'($urandom()), 1'b0);
    one(32'hFFFF_FFFF, 32'h1, 1'b0, 1'b0);
    one(32'h0, 32'h1, 1'b1, 1'b0);
    half_ps = 2500;
    win1 = 230;
    for (int i = 0; i < 20; i++) one(operand(), operand(), 1'($urandom()), 1'b0);
    win1 = 0; win2 = 390;
    for (int i = 0; i < 20; i++) one(operand(), operand(), 1'($urandom()), 1'b0);
    win2 = 0; win1 = 120;
    for (int i = 0; i < 20; i++) one(operand(), operand(), 1'($urandom()), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
