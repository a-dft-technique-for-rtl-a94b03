// Delay-fault testable 32-bit ALU (top level).
//
// A two-phase ALU whose critical path (adder front-end MUX, PG unit, carry
// merge tree, adder output stage, ALU MUX) is compound domino logic with an
// extra n-MOS footer in every dynamic gate. In NORMAL mode the footers are
// held on and the ALU runs at speed. In TEST mode the DFT logic turns the
// footers of one selected section off a fixed time after its clock phase
// opens, creating a short evaluation window whose closing edge is made on
// chip. A section that is slower than its window leaves its outputs at the
// precharged value, so a delay fault shows up as a wrong ALU result even
// when the tester runs the clock several times slower than NORMAL mode.
// Selecting one section at a time locates the faulty stages.
//
// Blocks (as in the ALU block diagram): input data stage, decoder unit,
// arithmetic unit (test sections 1 and 2, CLK=1), logic unit and shifter
// with the LU MUX, adder output stage and ALU MUX (test section 3, CLK=0),
// op latch stage, and the DFT logic.
//
// Interface: a, b and ad are sampled at a rising edge of clk; the result
// alu_op is valid from S3_DELAY_PS after the falling edge of the next cycle
// and held by the op latch from the rising edge after it, until the falling
// edge of that cycle: latency two cycles, one operation per cycle. A TEST
// code (alu_pkg) performs A + B with the selected section under a tight
// window; its TEST_CLK3 window follows the mode lines of the instruction
// behind it, so a section 3 test holds the TEST code for two cycles or more.
// test_clk brings the three footer signals out for observation.
// Timing parameters are the published 0.18 um values (see dft_logic,
// arithmetic_unit, alu_output_mux); the *_FAULT_PS parameters inject a
// delay defect into one section for fault simulation and are 0 in a good
// part. The phase-boundary latches have the clock as enable, which some
// lint tools report as "no latch detected"; they are intended latches.
module dft_alu32
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH          = ALU_WIDTH,
  parameter int unsigned TCLK1_DELAY_PS = 230,
  parameter int unsigned TCLK2_DELAY_PS = 390,
  parameter int unsigned TCLK3_DELAY_PS = 170,
  parameter int unsigned S1_DELAY_PS    = 170,
  parameter int unsigned S2_DELAY_PS    = 160,
  parameter int unsigned S3_DELAY_PS    = 110,
  parameter int unsigned S1_FAULT_PS    = 0,
  parameter int unsigned S2_FAULT_PS    = 0,
  parameter int unsigned S3_FAULT_PS    = 0
) (
  input  logic                clk,
  input  logic [WIDTH-1:0]    a,
  input  logic [WIDTH-1:0]    b,
  input  logic [AD_WIDTH-1:0] ad,
  output logic [WIDTH-1:0]    alu_op,
  output logic [2:0]          test_clk  // footer gates of sections 3..1
);
  timeunit 1ps; timeprecision 1ps;

  logic             clk_n;
  logic [WIDTH-1:0] a_bus, b_bus;
  logic [N_CODES-1:0] dec_lines;
  ph1_ctrl_t        ph1;
  ph2_ctrl_t        ph2;
  logic             test_clk1, test_clk2, test_clk3;
  logic [WIDTH-1:0] p_hold, c_hold;
  logic             cout_hold;
  logic [WIDTH-1:0] lu_y, sh_y, lu_hold;
  logic [WIDTH-1:0] result;

  assign clk_n    = ~clk;
  assign test_clk = {test_clk3, test_clk2, test_clk1};

  input_data_stage #(.WIDTH(WIDTH)) u_input (
    .clk, .a_in(a), .b_in(b), .a_bus, .b_bus
  );

  decoder_unit u_decoder (
    .clk, .ad, .dec_lines, .ph1, .ph2
  );

  dft_logic #(
    .TCLK1_DELAY_PS(TCLK1_DELAY_PS),
    .TCLK2_DELAY_PS(TCLK2_DELAY_PS),
    .TCLK3_DELAY_PS(TCLK3_DELAY_PS)
  ) u_dft (
    .clk, .clk_n, .t_n(ph1.t_n), .ctrl1(ph1.ctrl1), .ctrl2(ph1.ctrl2),
    .test_clk1, .test_clk2, .test_clk3
  );

  arithmetic_unit #(
    .WIDTH(WIDTH),
    .S1_DELAY_PS(S1_DELAY_PS), .S2_DELAY_PS(S2_DELAY_PS),
    .S1_FAULT_PS(S1_FAULT_PS), .S2_FAULT_PS(S2_FAULT_PS)
  ) u_arith (
    .clk, .a_bus, .b_bus, .sub(ph1.sub), .test_clk1, .test_clk2,
    .p_hold, .c_hold, .cout_hold
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a_bus, .b_bus, .lu_op(ph1.lu_op), .y(lu_y)
  );

  shifter #(.WIDTH(WIDTH)) u_shift (
    .a_bus, .b_bus, .sh_op(ph1.sh_op), .y(sh_y)
  );

  lu_mux #(.WIDTH(WIDTH)) u_lu_mux (
    .clk, .use_shift(ph1.use_shift), .lu_y, .sh_y, .y_hold(lu_hold)
  );

  alu_output_mux #(
    .WIDTH(WIDTH), .S3_DELAY_PS(S3_DELAY_PS), .S3_FAULT_PS(S3_FAULT_PS)
  ) u_alu_mux (
    .clk_n, .test_clk3, .ph2, .p_hold, .c_hold, .lu_hold, .result
  );

  // op latch stage, clocked by /CLK: open while CLK=0, closed at the rise
  phase_latch #(.WIDTH(WIDTH), .TRANSPARENT_HIGH(1'b0)) u_op_latch (
    .en(clk), .d(result), .q(alu_op)
  );

  // The adder carry-out and the one-hot decoder lines are not used by the
  // ALU outputs; they are kept for observation in simulation.
  logic unused_ok;
  assign unused_ok = cout_hold ^ (^dec_lines);
endmodule
