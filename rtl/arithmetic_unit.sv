// Arithmetic unit: adder front-end MUX and 32-bit parallel-prefix adder core.
//
// The unit is built from compound domino logic and evaluates while CLK=1,
// split into the two test sections the DFT logic can address:
//   section 1 (CDL stages 1-3, footer TEST_CLK1): the front-end MUX that
//     passes B or ~B (subtract), the PG unit (generate g = a & b,
//     propagate p = a ^ b, carry-in folded into bit 0) and the first
//     S1_LEVELS levels of the carry merge tree;
//   section 2 (CDL stages 4-6, footer TEST_CLK2): the remaining levels of
//     the carry merge tree, producing the carry into every bit.
// The carry merge tree is a radix-2 Kogge-Stone prefix tree with
// log2(WIDTH) levels, 5 for 32 bits, so that PG plus tree fill the six
// CLK=1 stages; the tree type and the 2/3 split of its levels are this
// design's choice. The propagate bits and carries are handed to the output
// stage (which evaluates while CLK=0) through a latch that is transparent
// while CLK=1 and closes at the falling edge: an evaluation that has not
// finished by the falling edge is lost, which is how a delay fault shows
// in NORMAL mode at speed.
// Timing: a_bus/b_bus/sub must be stable during CLK=1; p_hold/c_hold are
// valid S1_DELAY_PS + S2_DELAY_PS after the rising edge and held until the
// next rising edge. S1_DELAY_PS = 170 and S2_DELAY_PS = 160 are the
// published TEST_CLK1/TEST_CLK2 delays (230 ps, 390 ps) less the ~60 ps
// safety margin; the *_FAULT_PS parameters add a delay defect (0 = good).
module arithmetic_unit #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned S1_LEVELS   = 2,
  parameter int unsigned S1_DELAY_PS = 170,
  parameter int unsigned S2_DELAY_PS = 160,
  parameter int unsigned S1_FAULT_PS = 0,
  parameter int unsigned S2_FAULT_PS = 0
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a_bus,
  input  logic [WIDTH-1:0] b_bus,
  input  logic             sub,        // front-end MUX: 1 = A - B
  input  logic             test_clk1,  // footer of section 1
  input  logic             test_clk2,  // footer of section 2
  output logic [WIDTH-1:0] p_hold,     // half-sum a ^ b', held through CLK=0
  output logic [WIDTH-1:0] c_hold,     // carry into each bit, held through CLK=0
  output logic             cout_hold   // carry out of the MSB
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // One Kogge-Stone merge level: (g,p)[i] o (g,p)[i - span]
  function automatic logic [2*WIDTH-1:0] merge(input logic [WIDTH-1:0] g,
                                                input logic [WIDTH-1:0] p,
                                                input int unsigned span);
    logic [WIDTH-1:0] gn, pn;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (i >= span) begin
        gn[i] = g[i] | (p[i] & g[i-span]);
        pn[i] = p[i] & p[i-span];
      end else begin
        gn[i] = g[i];
        pn[i] = p[i];
      end
    end
    return {gn, pn};
  endfunction

  // ---------------- section 1: front-end MUX, PG unit, tree levels 1..S1
  logic [WIDTH-1:0] b_fe, p0, g0;

  assign b_fe = sub ? ~b_bus : b_bus;
  assign p0   = a_bus ^ b_fe;
  assign g0   = (a_bus & b_fe) | {{(WIDTH-1){1'b0}}, p0[0] & sub};  // carry-in = sub

  for (genvar l = 0; l <= S1_LEVELS; l++) begin : g_s1
    logic [WIDTH-1:0] g, p;
    if (l == 0) begin : g_pg
      assign g = g0;
      assign p = p0;
    end else begin : g_merge
      assign {g, p} = merge(g_s1[l-1].g, g_s1[l-1].p, 1 << (l-1));
    end
  end

  logic [3*WIDTH:0] s1_f, s1_q;
  assign s1_f = {sub, p0, g_s1[S1_LEVELS].g, g_s1[S1_LEVELS].p};

  cdl_section #(.WIDTH(3*WIDTH+1), .DELAY_PS(S1_DELAY_PS), .FAULT_PS(S1_FAULT_PS)) u_sec1 (
    .eval(clk), .footer(test_clk1), .f(s1_f), .q(s1_q)
  );

  // ---------------- section 2: tree levels S1+1..LEVELS
  logic [WIDTH-1:0] p0_s1, g_s1q, p_s1q;
  logic             cin_s1;

  assign {cin_s1, p0_s1, g_s1q, p_s1q} = s1_q;

  for (genvar l = S1_LEVELS; l <= LEVELS; l++) begin : g_s2
    logic [WIDTH-1:0] g, p;
    if (l == S1_LEVELS) begin : g_in
      assign g = g_s1q;
      assign p = p_s1q;
    end else begin : g_merge
      assign {g, p} = merge(g_s2[l-1].g, g_s2[l-1].p, 1 << (l-1));
    end
  end

  logic [2*WIDTH:0] s2_f, s2_q;
  // carry into bit i is the group generate of bits i-1..0 (carry-in folded)
  assign s2_f = {g_s2[LEVELS].g[WIDTH-1], p0_s1, g_s2[LEVELS].g[WIDTH-2:0], cin_s1};

  cdl_section #(.WIDTH(2*WIDTH+1), .DELAY_PS(S2_DELAY_PS), .FAULT_PS(S2_FAULT_PS)) u_sec2 (
    .eval(clk), .footer(test_clk2), .f(s2_f), .q(s2_q)
  );

  // ---------------- phase boundary to the CLK=0 output stage
  phase_latch #(.WIDTH(2*WIDTH+1), .TRANSPARENT_HIGH(1'b1)) u_phase (
    .en(clk), .d(s2_q), .q({cout_hold, p_hold, c_hold})
  );
endmodule
