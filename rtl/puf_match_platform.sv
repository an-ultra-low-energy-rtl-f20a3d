// One party of the matched-PUF security platform, plus the on-chip delay
// characterization circuit used to measure the programmable delay lines.
//
// Matching path: the party's own characterized PUF delay differences
// (own_d) and the partner's (partner_d) go to match_config, which builds
// the template PUF (per-segment maximum) and programs a programmable delay
// line (PDL) segment for every segment where this PUF falls short. After
// that, the party computes the template PUF's function E: a template
// challenge from the protocol engine is reassigned (challenge_reassign) to
// the longer challenge of the matched PUF (matched_puf: N original
// segments, then NP PDL slots), whose one-bit response is E(c). Two
// parties configured with each other's delay differences then answer every
// template challenge alike, up to the residual error of the PDL steps. The
// protocol engine uses E for XOR encryption/decryption and for
// challenge-response authentication.
//
// Measurement path (independent of the above, own clock meas_clk): the
// launch/sample/capture circuit around a 10-LUT chain (delay_char) and the
// timing error catcher counting errors over PULSES pulses. Sweeping
// meas_clk and finding where the error count rises gives the chain delay.
//
// The four-step flow (characterize, exchange, add PDL segments, reassign
// challenges), the two protocols and the measurement circuit follow the
// matched-PUF scheme; the port set, the separate measurement clock domain
// and the one-bit-per-challenge protocol interface are this design's.
//
// Characterizing the PUF and exchanging delay differences happen outside
// this block (by statistical modelling and over a secured channel), so
// own_d and partner_d are inputs. The swept clock generator and the PLL are
// external too: meas_clk is an input.
//
// Parameters: N template/PUF length (64 as in the evaluated PUFs), NP
// number of PDL slots (N: at most N segments can fall short), SEED the
// process-variation seed of this party's PUF model, RNG_SEED the protocol
// engine's random generator seed, N_LUT chain length, PULSES pulses per
// measurement. templ_d shows the template delay differences after
// configuration; puf_t_diff_fs shows the race margin of the last PUF
// evaluation (model observation, no hardware counterpart).
// Timing of each path: see the submodules.
module puf_match_platform #(
  parameter int          N        = 64,
  parameter int          NP       = N,
  parameter int          SEED     = 1,
  parameter logic [63:0] RNG_SEED = 64'h9E37_79B9_7F4A_7C15,
  parameter int          N_LUT    = 10,
  parameter int          PULSES   = 10_000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // matching configuration
  input  logic                          cfg_start,
  input  puf_pkg::delay_t               own_d     [N],
  input  puf_pkg::delay_t               partner_d [N],
  output logic                          cfg_busy,
  output logic                          cfg_done,
  output logic                          cfg_overflow,
  output logic [$clog2(NP+1)-1:0]       n_slots,
  output puf_pkg::delay_t               templ_d   [N],
  // protocols
  input  logic                          op_start,
  input  puf_pkg::op_t                  op,
  input  logic                          msg_in,
  input  logic [N-1:0]                  c_in,
  output logic                          op_busy,
  output logic                          out_valid,
  output logic                          out_bit,
  output logic [N-1:0]                  c_out,
  output logic                          auth_ok,
  output puf_pkg::delay_t               puf_t_diff_fs,
  // delay characterization
  input  logic                          meas_clk,
  input  logic                          meas_rst_n,
  input  logic [puf_pkg::CFG_BITS-1:0]  meas_cfg,
  input  logic                          meas_start,
  output logic                          meas_busy,
  output logic                          meas_done,
  output logic [$clog2(PULSES+1)-1:0]   meas_err_count
);
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;

  logic [NP-1:0]       slot_valid;
  logic [$clog2(N)-1:0] slot_map  [NP];
  pdl_cfg_t            slot_cfg   [NP];

  logic [N-1:0]        c_t;
  logic [N+NP-1:0]     c_ext;
  logic                puf_eval, puf_resp, puf_valid;
  logic                meas_err;

  match_config #(.N(N), .NP(NP)) u_cfg (
    .clk, .rst_n,
    .start      (cfg_start),
    .own_d, .partner_d,
    .busy       (cfg_busy),
    .done       (cfg_done),
    .overflow   (cfg_overflow),
    .templ_d,
    .slot_valid, .slot_map, .slot_cfg,
    .n_slots
  );

  protocol_engine #(.N(N), .RNG_SEED(RNG_SEED)) u_proto (
    .clk, .rst_n,
    .start     (op_start),
    .op, .msg_in, .c_in,
    .busy      (op_busy),
    .c_t,
    .puf_eval, .puf_resp, .puf_valid,
    .out_valid, .out_bit, .c_out, .auth_ok
  );

  challenge_reassign #(.N(N), .NP(NP)) u_reassign (
    .c_t, .slot_valid, .slot_map,
    .c_ext
  );

  matched_puf #(.N(N), .NP(NP), .SEED(SEED)) u_puf (
    .clk, .rst_n,
    .eval      (puf_eval),
    .challenge (c_ext),
    .pdl_cfg   (slot_cfg),
    .response  (puf_resp),
    .valid     (puf_valid),
    .t_diff_fs (puf_t_diff_fs)
  );

  delay_char #(.N_LUT(N_LUT)) u_dc (
    .clk   (meas_clk),
    .rst_n (meas_rst_n),
    .cfg   (meas_cfg),
    .err   (meas_err)
  );

  timing_error_catcher #(.PULSES(PULSES)) u_tec (
    .clk       (meas_clk),
    .rst_n     (meas_rst_n),
    .start     (meas_start),
    .err       (meas_err),
    .busy      (meas_busy),
    .done      (meas_done),
    .err_count (meas_err_count)
  );
endmodule
