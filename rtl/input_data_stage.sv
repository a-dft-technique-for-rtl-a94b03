// Input data stage of the ALU: A and B operand registers with bus drivers.
//
// Operands A[31:0] and B[31:0] are captured by flip-flops on the rising
// clock edge, as the block diagram shows (input FF, data driver stage,
// latch stage). The latch stage is transparent while CLK=0 and closed while
// CLK=1, so A_bus and B_bus change only during the precharge phase and stay
// stable for the whole evaluation phase of the domino arithmetic unit that
// follows. Operands captured at rising edge k are therefore evaluated from
// rising edge k+1. The data drivers are buffers and have no logic function.
// Clocking of the latch stage and the absence of a reset are this design's
// choices (every register is rewritten every cycle).
module input_data_stage #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  output logic [WIDTH-1:0] a_bus,
  output logic [WIDTH-1:0] b_bus
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] a_ff, b_ff;

  always_ff @(posedge clk) begin
    a_ff <= a_in;
    b_ff <= b_in;
  end

  phase_latch #(.WIDTH(2*WIDTH), .TRANSPARENT_HIGH(1'b0)) u_latch (
    .en(clk),
    .d ({a_ff, b_ff}),
    .q ({a_bus, b_bus})
  );
endmodule
