// Adder output stage and ALU MUX: test section 3 (CDL stages 7-8).
//
// Evaluates in compound domino logic during the CLK=0 phase, with the
// footer driven by TEST_CLK3. The adder output stage forms the sum bits
// p ^ c from the latched half-sums and carries of the arithmetic unit; the
// ALU MUX then passes the sum (sel_arith) or the latched LU MUX result
// (sel_lu). With neither select the domino outputs stay precharged and the
// result is zero. The lumped delay S3_DELAY_PS = 110 ps is the published
// TEST_CLK3 delay (170 ps after /CLK) less the ~60 ps safety margin;
// S3_FAULT_PS adds a delay defect (0 = good part). The result is valid
// S3_DELAY_PS after the falling edge of CLK and is cleared (precharged) at
// the rising edge, when the op latch stage has closed on it.
module alu_output_mux
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned S3_DELAY_PS = 110,
  parameter int unsigned S3_FAULT_PS = 0
) (
  input  logic             clk_n,      // evaluation phase: /CLK = 1
  input  logic             test_clk3,  // footer of section 3
  input  ph2_ctrl_t        ph2,
  input  logic [WIDTH-1:0] p_hold,
  input  logic [WIDTH-1:0] c_hold,
  input  logic [WIDTH-1:0] lu_hold,
  output logic [WIDTH-1:0] result
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] sum, f;

  assign sum = p_hold ^ c_hold;
  assign f   = ({WIDTH{ph2.sel_arith}} & sum) | ({WIDTH{ph2.sel_lu}} & lu_hold);

  cdl_section #(.WIDTH(WIDTH), .DELAY_PS(S3_DELAY_PS), .FAULT_PS(S3_FAULT_PS)) u_sec3 (
    .eval(clk_n), .footer(test_clk3), .f(f), .q(result)
  );
endmodule
