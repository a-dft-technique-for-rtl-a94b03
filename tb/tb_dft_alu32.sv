// End-to-end test of the delay-fault testable ALU, with fault simulation.
//
// Five copies of the ALU see the same clock and instruction stream: a good
// part (default parameters), one part per test section with a 100 ps delay
// defect in that section, and one with a 40 ps defect in section 1, which
// is smaller than the ~60 ps safety margin of the evaluation windows.
// Phases:
//   1. NORMAL mode at speed (1.5 GHz, 666 ps period): all operations on the
//      good part are checked against a reference model; sections 1 and 2
//      have almost no slack at speed, so their defects already fail there.
//   2. NORMAL mode at 200 MHz: no defective part fails (the slow clock
//      hides every defect: the non-DFT low-speed test escape).
//   3. TEST mode at 200 MHz, one section at a time, then the reserved code:
//      the good part passes, the part with a defect in the selected section
//      fails, parts with defects elsewhere pass (diagnosis by section), and
//      the 40 ps defect passes everywhere. The section 2 window is timed
//      from the CLK edge like the section 1 window, so a section 1 defect
//      fails both tests while a section 2 defect fails only the second:
//      the pattern of failing tests names the section.
// Results are checked every cycle, two cycles after the rising edge that
// sampled the operands, in the middle of the CLK=1 phase when the op latch holds them.
// Every mechanism above is counted and a mechanism that never happened is
// a failure.
module tb_dft_alu32;
  timeunit 1ps; timeprecision 1ps;
  import alu_pkg::*;

  localparam int unsigned NORMAL_HALF_PS = 333;   // 1.5 GHz
  localparam int unsigned TEST_HALF_PS   = 2500;  // 200 MHz
  localparam int unsigned NPARTS         = 5;     // good, f1, f2, f3, small
  localparam int unsigned NVEC           = 200;

  int unsigned checks = 0, failures = 0;
  int unsigned half_ps = NORMAL_HALF_PS;
  logic        clk = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic [4:0]  ad = 5'd9;
  logic [31:0] y   [NPARTS];
  logic [2:0]  tclk[NPARTS];

  always #(half_ps) clk = ~clk;

  dft_alu32 u_good (.clk, .a, .b, .ad, .alu_op(y[0]), .test_clk(tclk[0]));
  dft_alu32 #(.S1_FAULT_PS(100)) u_f1 (.clk, .a, .b, .ad, .alu_op(y[1]), .test_clk(tclk[1]));
  dft_alu32 #(.S2_FAULT_PS(100)) u_f2 (.clk, .a, .b, .ad, .alu_op(y[2]), .test_clk(tclk[2]));
  dft_alu32 #(.S3_FAULT_PS(100)) u_f3 (.clk, .a, .b, .ad, .alu_op(y[3]), .test_clk(tclk[3]));
  dft_alu32 #(.S1_FAULT_PS(40))  u_sm (.clk, .a, .b, .ad, .alu_op(y[4]), .test_clk(tclk[4]));

  // expected results of the last three instructions (index 0 = oldest)
  logic [31:0] exp_q [3];
  logic        chk_q [3];
  int unsigned mism [NPARTS];   // mismatches of each part in the current phase
  int unsigned op_seen [N_CODES];

  function automatic logic [31:0] rand_operand();
    case ($urandom_range(0, 3))
      0: return 32'hFFFF_FFFF >> $urandom_range(0, 31);  // long carry chains
      1: return $urandom();
      2: return 32'h8000_0000 | $urandom_range(0, 15);
      default: return $urandom();
    endcase
  endfunction

  // One clock cycle: check the result of the instruction from two cycles
  // ago, then apply a new instruction before the next rising edge.
  task automatic cycle(input logic [4:0] op, input bit check_it);
    @(posedge clk);
    #(half_ps / 2);
    if (chk_q[0]) begin
      for (int p = 0; p < NPARTS; p++) if (y[p] !== exp_q[0]) mism[p]++;
      checks++;
    end
    @(negedge clk);
    #(half_ps / 4);
    a  = rand_operand();
    b  = rand_operand();
    ad = op;
    exp_q[0] = exp_q[1];
    chk_q[0] = chk_q[1];
    exp_q[1] = exp_q[2];
    chk_q[1] = chk_q[2];
    exp_q[2] = alu_ref(op, a, b);
    chk_q[2] = check_it;
    if (check_it) op_seen[op]++;
  endtask

  task automatic clear_counts();
    for (int p = 0; p < NPARTS; p++) mism[p] = 0;
  endtask

  // Drain the pipeline with a code that selects no operation (result 0).
  task automatic drain();
    repeat (4) cycle(5'd9, 1'b0);
  endtask

  task automatic expect_fail(input string what, input int p, input bit must_fail);
    checks++;
    if ((mism[p] != 0) != must_fail) begin
      failures++;
      $display("FAIL %s: part %0d had %0d mismatches, expected %s", what, p, mism[p],
               must_fail ? "some" : "none");
    end
  endtask

  int unsigned mech_normal_ops = 0, mech_at_speed_detect = 0, mech_slow_escape = 0;
  int unsigned mech_test_detect[3] = '{0, 0, 0};
  int unsigned mech_diag_pass = 0, mech_margin_escape = 0, mech_reserved = 0;

  initial begin
    chk_q = '{0, 0, 0};
    exp_q = '{0, 0, 0};
    for (int i = 0; i < N_CODES; i++) op_seen[i] = 0;

    // ---- 1. NORMAL mode at speed
    half_ps = NORMAL_HALF_PS;
    drain();
    clear_counts();
    for (int i = 0; i < NVEC; i++) begin
      logic [4:0] op;
      op = (i % 10 == 9) ? 5'd9 : 5'(i % 9);
      cycle(op, 1'b1);
    end
    drain();
    expect_fail("normal at speed, good part", 0, 1'b0);
    expect_fail("normal at speed, 100 ps defect in section 1", 1, 1'b1);
    expect_fail("normal at speed, 100 ps defect in section 2", 2, 1'b1);
    expect_fail("normal at speed, 100 ps defect in section 3 (has slack)", 3, 1'b0);
    for (int op = 0; op <= 9; op++) begin
      checks++;
      if (op_seen[op] == 0) begin failures++; $display("FAIL opcode %0d never run", op); end
    end
    mech_normal_ops = op_seen[0] + op_seen[1] + op_seen[2] + op_seen[3] + op_seen[4];
    if (mism[1] != 0) mech_at_speed_detect++;
    if (mism[2] != 0) mech_at_speed_detect++;

    // ---- 2. NORMAL mode at 200 MHz: every defect escapes
    half_ps = TEST_HALF_PS;
    drain();
    clear_counts();
    for (int i = 0; i < NVEC / 4; i++) cycle(5'(i % 2), 1'b1);  // ADD / SUB
    drain();
    for (int p = 0; p < NPARTS; p++) begin
      expect_fail("normal at 200 MHz", p, 1'b0);
      if (p != 0 && mism[p] == 0) mech_slow_escape++;
    end

    // ---- 3. TEST mode at 200 MHz, one section at a time
    for (int s = 0; s < 4; s++) begin
      logic [4:0] code;
      code = 5'(OP_TEST_S1 + s);
      clear_counts();
      for (int i = 0; i < NVEC / 4; i++) cycle(code, 1'b1);
      drain();
      expect_fail($sformatf("test code %0d, good part", code), 0, 1'b0);
      expect_fail($sformatf("test code %0d, 40 ps defect", code), 4, 1'b0);
      for (int f = 1; f <= 3; f++)
        // the section 2 window is counted from the CLK edge, so it also
        // covers the delay of section 1
        expect_fail($sformatf("test code %0d, defect in section %0d", code, f), f,
                    (s == f - 1) || (s == 1 && f == 1));
      if (s < 3) begin
        if (mism[s + 1] != 0) mech_test_detect[s]++;
        for (int f = 2; f <= 3; f++) if (f != s + 1 && mism[f] == 0) mech_diag_pass++;
      end else begin
        mech_reserved++;
      end
      if (mism[4] == 0) mech_margin_escape++;
    end

    $display("mechanisms: normal_ops=%0d at_speed_detect=%0d slow_escape=%0d",
             mech_normal_ops, mech_at_speed_detect, mech_slow_escape);
    $display("            test_detect=%0d/%0d/%0d diag_pass=%0d margin_escape=%0d reserved=%0d",
             mech_test_detect[0], mech_test_detect[1], mech_test_detect[2],
             mech_diag_pass, mech_margin_escape, mech_reserved);
    checks++;
    if (mech_normal_ops == 0 || mech_at_speed_detect == 0 || mech_slow_escape == 0 ||
        mech_test_detect[0] == 0 || mech_test_detect[1] == 0 || mech_test_detect[2] == 0 ||
        mech_diag_pass == 0 || mech_margin_escape == 0 || mech_reserved == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(64'd20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
