// Shared types and constants of the delay-fault testable 32-bit ALU.
//
// The instruction is a 5-bit code AD[4:0] that the decoder expands 5:32.
// The ALU offers arithmetic, logical and shift operations in NORMAL mode and
// four TEST codes that set the DFT mode-select lines T/N, CTRL1 and CTRL2
// as in the mode table of the DFT logic:
//   T/N=0          NORMAL mode, every footer held at VDD
//   T/N=1, 00      test section 1 (PG unit and first carry-merge stages)
//   T/N=1, 01      test section 2 (rest of the carry merge tree)
//   T/N=1, 10      test section 3 (adder output stage and ALU MUX)
//   T/N=1, 11      reserved (low power stress testing)
// The numeric values of the opcodes are this design's own choice; only the
// width of AD and the TEST mode table come from the design description.
// Codes without an operation select nothing in the ALU MUX, so the
// precharged (all-zero) result reaches ALU_op.
package alu_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned ALU_WIDTH = 32;
  localparam int unsigned AD_WIDTH  = 5;
  localparam int unsigned N_CODES   = 1 << AD_WIDTH;

  typedef enum logic [AD_WIDTH-1:0] {
    OP_ADD      = 5'd0,
    OP_SUB      = 5'd1,
    OP_AND      = 5'd2,
    OP_OR       = 5'd3,
    OP_XOR      = 5'd4,
    OP_NOR      = 5'd5,
    OP_SLL      = 5'd6,
    OP_SRL      = 5'd7,
    OP_SRA      = 5'd8,
    OP_TEST_S1  = 5'd28,
    OP_TEST_S2  = 5'd29,
    OP_TEST_S3  = 5'd30,
    OP_TEST_RSV = 5'd31
  } opcode_e;

  // Logic unit functions.
  typedef enum logic [1:0] {
    LU_AND = 2'd0,
    LU_OR  = 2'd1,
    LU_XOR = 2'd2,
    LU_NOR = 2'd3
  } lu_op_e;

  // Shifter functions.
  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_SRA = 2'd2
  } sh_op_e;

  // Controls used while CLK=1 (arithmetic unit front end, logic unit,
  // shifter, LU MUX and the DFT mode-select lines).
  typedef struct packed {
    logic   sub;        // adder front-end MUX: B inverted, carry-in 1
    lu_op_e lu_op;
    sh_op_e sh_op;
    logic   use_shift;  // LU MUX: 1 selects the shifter
    logic   t_n;        // T/N: 1 = TEST mode
    logic   ctrl1;
    logic   ctrl2;
  } ph1_ctrl_t;

  // Controls used while CLK=0 (ALU MUX selects).
  typedef struct packed {
    logic sel_arith;    // ALU MUX passes the adder sum
    logic sel_lu;       // ALU MUX passes the LU MUX result
  } ph2_ctrl_t;

  // Reference model of one ALU operation, for testbenches.
  function automatic logic [ALU_WIDTH-1:0] alu_ref(input logic [AD_WIDTH-1:0] ad,
                                                   input logic [ALU_WIDTH-1:0] a,
                                                   input logic [ALU_WIDTH-1:0] b);
    logic [4:0] sh;
    sh = b[4:0];
    case (ad)
      OP_ADD, OP_TEST_S1, OP_TEST_S2, OP_TEST_S3, OP_TEST_RSV: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOR: return ~(a | b);
      OP_SLL: return a << sh;
      OP_SRL: return a >> sh;
      OP_SRA: return ALU_WIDTH'($signed(a) >>> sh);
      default: return '0;
    endcase
  endfunction
endpackage
