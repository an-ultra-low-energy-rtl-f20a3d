// Behavioural model of one FPGA LUT6 used as a programmable delay element.
//
// The LUT inverts its most significant input a[5]; the other five inputs
// a[4:0] only select which internal multiplexer path the signal takes, and
// so set the propagation delay (puf_pkg::lut_delay_fs). This is the delay
// element of both the programmable delay line (PDL) segments and the chain
// under test of the delay characterization circuit.
//
// Interface: a[5] signal in, a[4:0] configuration, o = ~a[5].
// Timing: every change of a[5] reaches o after the configured delay
// (transport delay, so pulses shorter than the delay are not swallowed).
// This is a simulation model of a silicon primitive, not synthesizable
// logic. Using the top input as the inverted signal and the other five as
// configuration follows the measurement setup; the delay values and their
// even spacing are this design's model, see puf_pkg.
module pdl_lut (
  input  logic [5:0] a,
  output logic       o
);
  timeunit 1fs;  // delays below are counted in femtoseconds
  timeprecision 1fs;
  import puf_pkg::*;

  // Evaluate once at start-up, then on every input change.
  always begin
    o <= #(lut_delay_fs(a[4:0])) ~a[5];
    @(a);
  end
endmodule
