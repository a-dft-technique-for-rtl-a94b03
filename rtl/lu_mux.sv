// LU MUX: selects the logic unit or the shifter result for the ALU MUX.
//
// A static 2:1 multiplexer followed by a latch that is transparent while
// CLK=1 and closes at the falling edge. The latch carries the result of an
// instruction into the CLK=0 phase, in which the ALU MUX evaluates, while
// the operand buses already change to the next instruction. The latch is
// this design's way of crossing the phase boundary; the design shows the
// multiplexer only. Like every latch here, its enable is the clock, which
// some lint tools report as "no latch detected"; the latch is intended.
module lu_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             use_shift,  // 1 = shifter, 0 = logic unit
  input  logic [WIDTH-1:0] lu_y,
  input  logic [WIDTH-1:0] sh_y,
  output logic [WIDTH-1:0] y_hold
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] y;
  assign y = use_shift ? sh_y : lu_y;

  phase_latch #(.WIDTH(WIDTH), .TRANSPARENT_HIGH(1'b1)) u_latch (
    .en(clk), .d(y), .q(y_hold)
  );
endmodule
