// Defect-size sweep: the smallest delay defect each test finds, per section.
//
// One ALU per (section, defect size) pair, 3 x 8 in all, runs the same
// instruction stream as a good ALU. Defects are added to the lumped delay of
// section 1 (PG unit and first carry-merge levels), section 2 (rest of the
// carry merge tree) or section 3 (sum and ALU MUX). Three tests are run:
//   * NORMAL mode at 1.5 GHz, the at-speed test without the footers;
//   * NORMAL mode at 200 MHz, a slow test without the footers;
//   * TEST mode at 200 MHz with the defect's own section under test.
// Expected, from the timing of the design: TEST mode finds every defect
// above the 60 ps safety margin; at speed, sections 1 and 2 have 3 ps of
// slack before the falling edge and section 3 has 223 ps before the rising
// edge; the slow NORMAL test finds nothing. The table of smallest detected
// defects is printed and compared with these limits.
module tb_fault_sweep;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  localparam int NDLY = 8;
  localparam int unsigned SLACK_AT_SPEED [3] = '{3, 3, 223};
  localparam int unsigned MARGIN = 60;

  function automatic int unsigned dly(input int k);
    case (k)
      0: return 20;  1: return 40;  2: return 55;  3: return 70;
      4: return 100; 5: return 150; 6: return 250; default: return 400;
    endcase
  endfunction

  int unsigned checks = 0, failures = 0;
  int unsigned half_ps = 333;
  logic        clk = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [4:0]  ad = 5'd9;
  logic [31:0] y_good;
  logic [31:0] y [3][NDLY];

  always #(half_ps) clk = ~clk;

  dft_alu32 u_good (.clk, .a, .b, .ad, .alu_op(y_good), .test_clk());

  for (genvar s = 0; s < 3; s++) begin : g_sec
    for (genvar k = 0; k < NDLY; k++) begin : g_dly
      dft_alu32 #(
        .S1_FAULT_PS(s == 0 ? dly(k) : 0),
        .S2_FAULT_PS(s == 1 ? dly(k) : 0),
        .S3_FAULT_PS(s == 2 ? dly(k) : 0)
      ) u_alu (.clk, .a, .b, .ad, .alu_op(y[s][k]), .test_clk());
    end
  end

  logic [31:0] exp_q [3] = '{0, 0, 0};
  logic        chk_q [3] = '{0, 0, 0};
  int unsigned mism [3][NDLY];
  int unsigned good_mism;

  task automatic cycle(input logic [4:0] op, input bit check_it);
    @(posedge clk);
    #(half_ps / 2);
    if (chk_q[0]) begin
      if (y_good !== exp_q[0]) good_mism++;
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < NDLY; k++) if (y[s][k] !== exp_q[0]) mism[s][k]++;
    end
    @(negedge clk);
    #(half_ps / 4);
    a  = (($urandom() & 1) != 0) ? (32'hFFFF_FFFF >> $urandom_range(0, 8)) : $urandom();
    b  = $urandom();
    ad = op;
    exp_q = '{exp_q[1], exp_q[2], alu_ref(op, a, b)};
    chk_q = '{chk_q[1], chk_q[2], check_it};
  endtask

  task automatic clear();
    good_mism = 0;
    for (int s = 0; s < 3; s++) for (int k = 0; k < NDLY; k++) mism[s][k] = 0;
  endtask

  // compare detections with the expected limit for one test
  task automatic judge(input string test, input int s, input int unsigned limit);
    int unsigned first;
    first = 0;
    for (int k = NDLY - 1; k >= 0; k--) begin
      bit exp_det;
      exp_det = dly(k) > limit;
      checks++;
      if ((mism[s][k] != 0) != exp_det) begin
        failures++;
        $display("FAIL %s, section %0d, %0d ps defect: %0d mismatches, expected %s",
                 test, s + 1, dly(k), mism[s][k], exp_det ? "detection" : "none");
      end
      if (mism[s][k] != 0) first = dly(k);
    end
    if (first != 0) $display("  %-28s section %0d: smallest detected defect %0d ps", test, s + 1, first);
    else            $display("  %-28s section %0d: no swept defect detected", test, s + 1);
  endtask

  task automatic good_ok(input string test);
    checks++;
    if (good_mism != 0) begin failures++; $display("FAIL good part in %s", test); end
  endtask

  initial begin
    // at-speed NORMAL test (ADD and SUB exercise the whole critical path)
    half_ps = 333;
    repeat (4) cycle(5'd9, 1'b0);
    clear();
    for (int i = 0; i < 60; i++) cycle(5'(i % 2), 1'b1);
    repeat (4) cycle(5'd9, 1'b0);
    good_ok("NORMAL 1.5 GHz");
    for (int s = 0; s < 3; s++) judge("NORMAL mode, 1.5 GHz", s, SLACK_AT_SPEED[s]);

    // slow NORMAL test
    half_ps = 2500;
    repeat (4) cycle(5'd9, 1'b0);
    clear();
    for (int i = 0; i < 30; i++) cycle(5'(i % 2), 1'b1);
    repeat (4) cycle(5'd9, 1'b0);
    good_ok("NORMAL 200 MHz");
    for (int s = 0; s < 3; s++) judge("NORMAL mode, 200 MHz", s, 1000);

    // TEST mode, each section with its own code
    for (int s = 0; s < 3; s++) begin
      clear();
      for (int i = 0; i < 30; i++) cycle(5'(OP_TEST_S1 + s), 1'b1);
      repeat (4) cycle(5'd9, 1'b0);
      good_ok("TEST mode");
      judge("TEST mode, 200 MHz", s, MARGIN);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
