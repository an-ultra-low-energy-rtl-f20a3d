// Delay characterization circuit: measures the delay of a LUT chain by
// finding the clock period at which it starts to fail timing.
//
// Three flip-flops share one clock. The launch flip-flop toggles every
// cycle (its output is fed back through an inverter), so every rising edge
// sends a new transition into the circuit under test (CUT, lut_chain_cut).
// The sample flip-flop captures the CUT output one cycle later. If the
// transition arrived in time, the sampled value equals the value launched
// one cycle before, which is the inverse of the launch flip-flop's present
// output; an XOR of the two flags a mismatch, and the capture flip-flop
// registers that flag as err one cycle later.
//
// The three-flip-flop structure, the XOR error detection and the 10-LUT
// chain follow the measurement setup. Comparing against the inverted launch
// output (rather than a fourth reference register) and the reset are this
// design's choices.
//
// Interface: clk is the swept measurement clock, rst_n an active-low
// asynchronous reset, cfg the configuration bits of all CUT LUTs.
// err is valid from the third rising edge after reset onwards: 1 means the
// sample taken two edges earlier violated timing.
module delay_char #(
  parameter int N_LUT = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [puf_pkg::CFG_BITS-1:0] cfg,
  output logic                         err
);
  timeunit 1ps;
  timeprecision 1fs;

  logic launch_q, sample_q, cut_out, mismatch;
  logic [1:0] warm;  // suppresses err until sample_q holds a real sample

  lut_chain_cut #(.N_LUT(N_LUT)) u_cut (
    .din  (launch_q),
    .cfg  (cfg),
    .dout (cut_out)
  );

  // XOR error detection: in time, sample_q == value launched one cycle ago.
  assign mismatch = sample_q ^ ~launch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_q <= 1'b0;
      sample_q <= 1'b0;
      err      <= 1'b0;
      warm     <= '0;
    end else begin
      launch_q <= ~launch_q;
      sample_q <= cut_out;
      if (warm != 2'd2) warm <= warm + 2'd1;
      err      <= (warm == 2'd2) && mismatch;
    end
  end
endmodule
