// Level-sensitive latch used at every clock-phase boundary of the ALU.
//
// The ALU evaluates on both clock phases, so data that must survive a phase
// change is held in latches rather than edge flip-flops. With
// TRANSPARENT_HIGH = 1 the latch follows d while en is 1 and holds while en
// is 0; with TRANSPARENT_HIGH = 0 it follows d while en is 0. The ALU's
// output "op_latch" stage is one of these, clocked by the inverted clock
// (transparent while CLK=0, closed at the rising edge), as drawn in the ALU
// block diagram; the latch stages after the input flip-flops are the others.
// Reset is not provided: every user of this latch rewrites it each cycle.
module phase_latch #(
  parameter int unsigned WIDTH            = 32,
  parameter bit          TRANSPARENT_HIGH = 1'b1
) (
  input  logic             en,  // latch clock
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  if (TRANSPARENT_HIGH) begin : g_high
    always_latch begin
      if (en) q = d;
    end
  end else begin : g_low
    always_latch begin
      if (!en) q = d;
    end
  end
endmodule
