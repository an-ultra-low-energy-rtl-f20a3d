// Behavioural model of a matched arbiter PUF: an N-segment arbiter PUF
// followed by NP programmable-delay-line (PDL) segments.
//
// Each segment has an upper and a lower delay. After segment i the two
// paths pass a pair of multiplexers steered by challenge bit i: with 0 the
// paths go straight on, with 1 they swap, which also swaps everything the
// two paths have collected so far. At the end an arbiter decides which path
// won the race. Because of this, only the running difference
// (upper minus lower) matters: add d^0 - d^1 of the segment, then negate it
// when the challenge bit is 1.
//
// Segments 0..N-1 are the original PUF; their delays come from the
// process-variation model puf_pkg::seg_delay_fs with this device's SEED.
// Segments N..N+NP-1 are PDL segments: pdl_cfg[s].luts LUTs in
// configuration cu on the upper path and as many in configuration cl on
// the lower path (luts = 0: unused, no delay). Challenge bit 0 steers the
// first segment.
//
// The segment/swap/arbiter structure follows the standard arbiter PUF and
// the appended PDL segments follow the matching scheme. Which arbiter input
// a response of 1 stands for is this design's choice: response = 1 when
// the lower path arrives first (upper path slower, t_diff_fs > 0).
//
// Interface and timing: when eval is high at a rising clk edge the race is
// run with the present challenge and configuration; response and valid
// appear after that edge (one cycle per evaluation). t_diff_fs shows the
// arrival-time difference of the last evaluation, for observation only.
// This is a model of silicon whose behaviour rests on process variation;
// it is not a synthesizable implementation of the PUF.
module matched_puf #(
  parameter int N    = 64,
  parameter int NP   = N,
  parameter int SEED = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  eval,
  input  logic [N+NP-1:0]       challenge,
  input  puf_pkg::pdl_cfg_t     pdl_cfg [NP],
  output logic                  response,
  output logic                  valid,
  output puf_pkg::delay_t       t_diff_fs
);
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;

  delay_t seg_diff [N+NP];  // d^0 - d^1 of every segment
  delay_t race;

  for (genvar i = 0; i < N; i++) begin : g_puf
    assign seg_diff[i] = seg_diff_fs(SEED, i);
  end
  for (genvar s = 0; s < NP; s++) begin : g_pdl
    assign seg_diff[N+s] = pdl_diff_fs(pdl_cfg[s]);
  end

  always_comb begin
    race = '0;
    for (int i = 0; i < N + NP; i++) begin
      race = race + seg_diff[i];
      if (challenge[i]) race = -race;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response  <= 1'b0;
      valid     <= 1'b0;
      t_diff_fs <= '0;
    end else begin
      valid <= eval;
      if (eval) begin
        response  <= (race > 0);
        t_diff_fs <= race;
      end
    end
  end
endmodule
