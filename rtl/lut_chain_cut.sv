// Behavioural model of the circuit under test (CUT) of the delay
// characterization circuit: a chain of N_LUT LUT6 inverters.
//
// Every LUT inverts the signal on its top input and all LUTs share the same
// five configuration bits, so the chain delay is N_LUT times the delay of
// one LUT in that configuration and the per-LUT delay is the chain delay
// divided by N_LUT. The chain of 10 LUTs follows the measurement setup; with
// an even N_LUT the chain does not invert.
//
// Interface: din enters the first LUT, cfg configures all LUTs, dout leaves
// the last one. Timing: pure propagation delay, no clock.
module lut_chain_cut #(
  parameter int N_LUT = 10
) (
  input  logic                   din,
  input  logic [puf_pkg::CFG_BITS-1:0] cfg,
  output logic                   dout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_LUT:0] node;

  assign node[0] = din;

  for (genvar i = 0; i < N_LUT; i++) begin : g_lut
    pdl_lut u_lut (
      .a ({node[i], cfg}),
      .o (node[i+1])
    );
  end

  assign dout = node[N_LUT];
endmodule
