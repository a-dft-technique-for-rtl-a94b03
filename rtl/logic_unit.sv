// Logic unit of the ALU: bitwise AND, OR, XOR and NOR of A_bus and B_bus.
//
// The logic unit is off the critical path and was built in complementary
// pass-transistor logic; here it is plain combinational logic. The set of
// logical functions is this design's choice (the design only names a
// logic unit). Inputs are stable during CLK=1; the result is valid a
// combinational delay later and is sampled by the LU MUX latch.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a_bus,
  input  logic [WIDTH-1:0] b_bus,
  input  lu_op_e           lu_op,
  output logic [WIDTH-1:0] y
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    unique case (lu_op)
      LU_AND: y = a_bus & b_bus;
      LU_OR:  y = a_bus | b_bus;
      LU_XOR: y = a_bus ^ b_bus;
      LU_NOR: y = ~(a_bus | b_bus);
    endcase
  end
endmodule
