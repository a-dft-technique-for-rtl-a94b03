// Shifter of the ALU: shifts A_bus by the amount in the low bits of B_bus.
//
// Logarithmic barrel shifter with log2(WIDTH) stages; each stage shifts by
// a power of two when its amount bit is set. Shift left logical, shift
// right logical and shift right arithmetic are supported; the set of shift
// functions and taking the amount from B_bus[log2(WIDTH)-1:0] are this
// design's choices (the design only names a shifter, built in pass-
// transistor logic off the critical path). Purely combinational.
module shifter
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a_bus,
  input  logic [WIDTH-1:0] b_bus,
  input  sh_op_e           sh_op,
  output logic [WIDTH-1:0] y
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SW = $clog2(WIDTH);

  logic [SW-1:0]    amt;
  logic             fill;
  logic             left;
  logic [WIDTH-1:0] rev_in;

  assign amt  = b_bus[SW-1:0];
  assign left = (sh_op == SH_SLL);
  assign fill = (sh_op == SH_SRA) & a_bus[WIDTH-1];

  // Left shifts are done as right shifts of the bit-reversed operand.
  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) rev_in[i] = a_bus[WIDTH-1-i];
  end

  for (genvar s = 0; s <= SW; s++) begin : g_stage
    logic [WIDTH-1:0] v;
    if (s == 0) begin : g_in
      assign v = left ? rev_in : a_bus;
    end else begin : g_shift
      localparam int unsigned K = 1 << (s-1);
      assign v = amt[s-1] ? {{K{fill}}, g_stage[s-1].v[WIDTH-1:K]} : g_stage[s-1].v;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++)
      y[i] = left ? g_stage[SW].v[WIDTH-1-i] : g_stage[SW].v[i];
  end
endmodule
