// Full-size test of the ALU with every parameter at its default.
//
// One good 32-bit ALU runs every NORMAL mode operation at 1.5 GHz, then the
// four TEST codes at 200 MHz, and every result is compared with a reference
// model two cycles after its operands were sampled. In TEST mode the
// footer signal of the selected section is also checked to fall one
// evaluation window after its clock edge (230, 390 and 170 ps) and the
// other footers to stay high.
module tb_dft_alu32_full;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  int unsigned checks = 0, failures = 0;
  int unsigned half_ps = 333;
  logic        clk = 1'b0;
  logic [31:0] a = '0, b = '0, y;
  logic [4:0]  ad = 5'd9;
  logic [2:0]  tclk;
  logic [31:0] exp_q [3] = '{0, 0, 0};
  logic        chk_q [3] = '{0, 0, 0};

  always #(half_ps) clk = ~clk;

  dft_alu32 dut (.clk, .a, .b, .ad, .alu_op(y), .test_clk(tclk));

  task automatic cycle(input logic [4:0] op, input bit check_it);
    @(posedge clk);
    #(half_ps / 2);
    if (chk_q[0]) begin
      checks++;
      if (y !== exp_q[0]) begin
        failures++;
        $display("FAIL result %h expected %h", y, exp_q[0]);
      end
    end
    @(negedge clk);
    #(half_ps / 4);
    a  = $urandom();
    b  = $urandom();
    ad = op;
    exp_q = '{exp_q[1], exp_q[2], alu_ref(op, a, b)};
    chk_q = '{chk_q[1], chk_q[2], check_it};
  endtask

  // Time from the clock edge that opens a section's phase to the fall of
  // its footer signal.
  task automatic measure_window(input int s, input int unsigned expect_ps);
    time t0, t1;
    if (s == 2) @(negedge clk); else @(posedge clk);
    t0 = $time;
    @(negedge tclk[s]);
    t1 = $time;
    checks++;
    if (t1 - t0 != expect_ps) begin
      failures++;
      $display("FAIL TEST_CLK%0d window %0t ps, expected %0d", s + 1, t1 - t0, expect_ps);
    end
    for (int o = 0; o < 3; o++) if (o != s) begin
      checks++;
      if (tclk[o] !== 1'b1) begin failures++; $display("FAIL TEST_CLK%0d not held high", o + 1); end
    end
  endtask

  initial begin
    int unsigned win [3] = '{230, 390, 170};
    repeat (4) cycle(5'd9, 1'b0);
    for (int i = 0; i < 40; i++) cycle(5'(i % 10), 1'b1);
    repeat (4) cycle(5'd9, 1'b0);
    checks++;
    if (tclk !== 3'b111) begin failures++; $display("FAIL footers not on in NORMAL mode"); end
    half_ps = 2500;
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 10; i++) begin
        if (i == 4 && s < 3) begin
          automatic int ss = s;
          fork measure_window(ss, win[ss]); join_none
        end
        cycle(5'(OP_TEST_S1 + s), 1'b1);
      end
      if (s == 3) begin
        checks++;
        if (tclk !== 3'b111) begin failures++; $display("FAIL reserved code footers"); end
      end
      repeat (4) cycle(5'd9, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
