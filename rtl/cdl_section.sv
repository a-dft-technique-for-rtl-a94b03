// Behaviour of a group of compound-domino (CDL) stages with a DFT footer.
//
// A CDL section is a chain of alternating dynamic (domino) and static
// gates. Its dynamic gates precharge while their clock phase is inactive
// (outputs low behind the static inverters) and evaluate while it is active.
// During evaluation an output can only rise (discharge of the dynamic node)
// and it can only do so while the extra n-MOS footer transistor is on.
// The footer gate is driven by one TEST_CLK output of the DFT logic: held
// at VDD in NORMAL mode, it falls a fixed time after the phase opens when
// this section is under test, and an output whose evaluation has not
// arrived by then stays low. A delay fault inside the section thereby
// becomes a logic failure visible at the ALU outputs.
//
// The logic function itself is computed outside and applied at f. The
// section adds a lumped propagation delay DELAY_PS + FAULT_PS from the
// opening of the phase (or from a later change of f) to its outputs:
// DELAY_PS is the nominal delay of the section, FAULT_PS an extra delay
// that models a resistive defect (0 in a good part). f must be monotonic
// rising during evaluation, as domino logic requires. Lumping the delay per
// section and the inertial delay model are this design's simplifications.
//   eval    1 while the section's clock phase evaluates (CLK or /CLK)
//   footer  footer gate; 1 = footer on
module cdl_section #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DELAY_PS = 170,
  parameter int unsigned FAULT_PS = 0
) (
  input  logic             eval,
  input  logic             footer,
  input  logic [WIDTH-1:0] f,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  logic [WIDTH-1:0] pd_on;     // pull-down networks that conduct
  logic [WIDTH-1:0] pd_dly; // ... seen after the section delay

  assign pd_on = eval ? f : '0;
  assign #(DELAY_PS + FAULT_PS) pd_dly = pd_on;

  // Dynamic nodes with keepers: precharge, then evaluation gated by the
  // footer. With the footer off the keeper holds whatever has evaluated.
  always_latch begin
    if (!eval)       q = '0;
    else if (footer) q = pd_dly;
  end
endmodule
