// Matching configurator: builds the template PUF from the two parties'
// characterized delay differences and programs this party's PDL segments so
// that its PUF becomes the template.
//
// For every segment i (in order) the template delay difference is
// d_T[i] = max(own_d[i], partner_d[i]). Where own_d[i] already equals it,
// nothing is added. Where own_d[i] is smaller, the next free PDL slot is
// given to segment i (slot_map) and configured to add the missing
// difference delta = d_T[i] - own_d[i]: an exhaustive search over the
// upper-LUT configuration cu, the lower-LUT configuration cl and the number
// of LUTs per side (1..MAX_LUTS) picks the setting whose difference
// luts * (lut_delay(cu) - lut_delay(cl)) is closest to delta. One (cu, cl)
// pair is tried per cycle, all LUT counts in parallel; ties keep the
// first setting found (lowest cu, then cl, then LUT count).
//
// The max template, the one-slot-per-short-segment rule and building each
// slot from a pair of LUT configurations, with more LUTs when one pair is
// not enough, follow the matching scheme. The search order, the sequential
// schedule and the handshake are this design's choices.
//
// Interface: start (while idle) begins a run; own_d and partner_d (fs, see
// puf_pkg) must stay stable while busy. done pulses once at the end; then
// templ_d, slot_valid, slot_map, slot_cfg and n_slots hold the result until
// the next start. overflow is set when more than NP slots were needed; the
// extra segments are then left unmatched.
// Timing: done rises N + 2**(2*CFG_BITS) * n_slots cycles after the start
// cycle (1 cycle per segment plus 1024 per allocated slot).
module match_config #(
  parameter int N  = 64,
  parameter int NP = N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  puf_pkg::delay_t          own_d     [N],
  input  puf_pkg::delay_t          partner_d [N],
  output logic                     busy,
  output logic                     done,
  output logic                     overflow,
  output puf_pkg::delay_t          templ_d   [N],
  output logic [NP-1:0]            slot_valid,
  output logic [$clog2(N)-1:0]     slot_map  [NP],
  output puf_pkg::pdl_cfg_t        slot_cfg  [NP],
  output logic [$clog2(NP+1)-1:0]  n_slots
);
  timeunit 1ps;
  timeprecision 1fs;
  import puf_pkg::*;

  localparam int IW = $clog2(N);
  localparam int SW = $clog2(NP+1);
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_SEARCH} state_t;

  state_t        state;
  logic [IW-1:0] idx;       // segment under consideration
  delay_t        target;    // difference the current slot must add
  cfg_t          cu, cl;    // pair under test
  logic [31:0]   best_err;
  pdl_cfg_t      best;

  delay_t        d_own, d_tmp;
  logic [31:0]   pair_err;  // best error of the present (cu, cl) pair
  pdl_cfg_t      pair_cfg;
  logic          pair_wins;
  pdl_cfg_t      best_next;
  logic          last_seg, last_pair;
  logic [PW-1:0] slot_idx;  // next free slot

  assign slot_idx  = PW'(n_slots);

  assign d_own     = own_d[idx];
  assign d_tmp     = (partner_d[idx] > d_own) ? partner_d[idx] : d_own;
  assign last_seg  = (idx == IW'(N - 1));
  assign last_pair = (&cu) && (&cl);

  // Try every LUT count for the present (cu, cl) pair.
  always_comb begin
    delay_t      step, cand;
    logic [31:0] e;
    step     = lut_delay_fs(cu) - lut_delay_fs(cl);
    pair_err = '1;
    pair_cfg = '{cu: cu, cl: cl, luts: LUTS_W'(1)};
    for (int m = 1; m <= MAX_LUTS; m++) begin
      cand = delay_t'(m) * step;
      e    = (cand > target) ? 32'(cand - target) : 32'(target - cand);
      if (e < pair_err) begin
        pair_err = e;
        pair_cfg = '{cu: cu, cl: cl, luts: LUTS_W'(m)};
      end
    end
    pair_wins = (pair_err < best_err);
    best_next = pair_wins ? pair_cfg : best;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      busy       <= 1'b0;
      done       <= 1'b0;
      overflow   <= 1'b0;
      idx        <= '0;
      target     <= '0;
      cu         <= '0;
      cl         <= '0;
      best_err   <= '1;
      best       <= '0;
      n_slots    <= '0;
      slot_valid <= '0;
      for (int i = 0; i < N; i++)  templ_d[i] <= '0;
      for (int s = 0; s < NP; s++) begin
        slot_map[s] <= '0;
        slot_cfg[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_SCAN;
          busy       <= 1'b1;
          overflow   <= 1'b0;
          idx        <= '0;
          n_slots    <= '0;
          slot_valid <= '0;
          for (int s = 0; s < NP; s++) slot_cfg[s] <= '0;
        end
        S_SCAN: begin
          templ_d[idx] <= d_tmp;
          if (d_own < d_tmp && n_slots != SW'(NP)) begin
            target                   <= d_tmp - d_own;
            slot_map[slot_idx]   <= idx;
            slot_valid[slot_idx] <= 1'b1;
            cu       <= '0;
            cl       <= '0;
            best_err <= '1;
            state    <= S_SEARCH;
          end else begin
            if (d_own < d_tmp) overflow <= 1'b1;
            if (last_seg) begin
              state <= S_IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end else begin
              idx <= idx + IW'(1);
            end
          end
        end
        S_SEARCH: begin
          if (pair_wins) begin
            best_err <= pair_err;
            best     <= pair_cfg;
          end
          {cu, cl} <= {cu, cl} + 1'b1;
          if (last_pair) begin
            slot_cfg[slot_idx] <= best_next;
            n_slots <= n_slots + SW'(1);
            if (last_seg) begin
              state <= S_IDLE;
              busy  <= 1'b0;
              done  <= 1'b1;
            end else begin
              idx   <= idx + IW'(1);
              state <= S_SCAN;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
