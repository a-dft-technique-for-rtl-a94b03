// One inverter of the DFT delay chain.
//
// Logically a plain inverter; DELAY_PS annotates the propagation delay the
// sized transistors give it, so that an event-driven simulation reproduces
// the evaluation windows the DFT logic creates. Synthesis ignores the delay
// and maps a single inverter (in silicon the delay comes from sizing). The
// delay is inertial: pulses shorter than DELAY_PS are swallowed.
module dft_delay_inv #(
  parameter int unsigned DELAY_PS = 80
) (
  input  logic a,
  output logic y
);
  timeunit 1ps; timeprecision 1ps;

  assign #(DELAY_PS) y = ~a;
endmodule
