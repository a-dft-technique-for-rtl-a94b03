// DFT logic: generates the delayed-inverted TEST_CLK footer signals.
//
// The three outputs drive the gates of the n-MOS footer transistors of the
// three CDL test sections of the ALU. Structure, as drawn in the design:
//   * Two 2:1 input MUXes. Node A selects VDD (NORMAL) or CLK (TEST);
//     node B selects VDD or /CLK. In NORMAL mode the whole chain is parked
//     at constant levels and adds no load to the clock.
//   * A delay chain of an odd number of static inverters behind each input
//     MUX, so every TEST_CLK is inverted with respect to its clock.
//     TEST_CLK1 taps the chain after one inverter; TEST_CLK2 shares that
//     inverter and adds two more; TEST_CLK3 has one inverter behind node B.
//   * Three 3:1 output MUXes that pass either VDD or the chain tap,
//     according to T/N, CTRL1 and CTRL2:
//       T/N=0        all outputs VDD (footers always on, NORMAL mode)
//       T/N=1, 00    TEST_CLK1 = delayed /CLK, others VDD   (section 1)
//       T/N=1, 01    TEST_CLK2 = delayed /CLK, others VDD   (section 2)
//       T/N=1, 10    TEST_CLK3 = delayed CLK,  others VDD   (section 3)
//       T/N=1, 11    reserved: all outputs VDD in this design
// A selected TEST_CLK falls a fixed delay after the clock edge that opens
// the evaluation phase of its section, which closes that section's
// evaluation window early. The defaults are the published delays of the
// 0.18 um implementation: 230 ps and 390 ps after the rising edge of CLK,
// and 170 ps after the rising edge of /CLK, each including a ~60 ps safety
// margin. How the 390 ps divide over the shared chain (230 + 80 + 80 ps),
// the zero delay of the MUXes and the reserved-code outputs are this
// design's choices. The delays are simulation annotations on the
// inverters; a synthesis tool sees plain inverters and MUXes.
module dft_logic #(
  parameter int unsigned TCLK1_DELAY_PS = 230,  // TEST_CLK1 delay after CLK rise
  parameter int unsigned TCLK2_DELAY_PS = 390,  // TEST_CLK2 delay after CLK rise
  parameter int unsigned TCLK3_DELAY_PS = 170   // TEST_CLK3 delay after /CLK rise
) (
  input  logic clk,
  input  logic clk_n,
  input  logic t_n,     // 1 = TEST mode
  input  logic ctrl1,
  input  logic ctrl2,
  output logic test_clk1,
  output logic test_clk2,
  output logic test_clk3
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned INV2_PS = (TCLK2_DELAY_PS - TCLK1_DELAY_PS) / 2;
  localparam int unsigned INV3_PS = TCLK2_DELAY_PS - TCLK1_DELAY_PS - INV2_PS;

  logic node_a, node_b;      // input MUX outputs
  logic tap1, tap2_n, tap2;  // chain nodes behind node A
  logic tap3;                // chain node behind node B

  // 2:1 input MUX stage
  assign node_a = t_n ? clk   : 1'b1;
  assign node_b = t_n ? clk_n : 1'b1;

  // delay chain (the first inverter is shared by TEST_CLK1 and TEST_CLK2)
  dft_delay_inv #(.DELAY_PS(TCLK1_DELAY_PS)) u_inv1 (.a(node_a), .y(tap1));
  dft_delay_inv #(.DELAY_PS(INV2_PS))        u_inv2 (.a(tap1),   .y(tap2_n));
  dft_delay_inv #(.DELAY_PS(INV3_PS))        u_inv3 (.a(tap2_n), .y(tap2));
  dft_delay_inv #(.DELAY_PS(TCLK3_DELAY_PS)) u_invb (.a(node_b), .y(tap3));

  // 3:1 output MUX stage
  always_comb begin
    test_clk1 = 1'b1;
    test_clk2 = 1'b1;
    test_clk3 = 1'b1;
    if (t_n) begin
      unique case ({ctrl1, ctrl2})
        2'b00:   test_clk1 = tap1;
        2'b01:   test_clk2 = tap2;
        2'b10:   test_clk3 = tap3;
        default: ;  // reserved
      endcase
    end
  end
endmodule
