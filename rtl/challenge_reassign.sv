// Challenge reassignment: turns an N-bit challenge of the template PUF into
// the (N+NP)-bit challenge of this party's matched PUF, so that every
// segment of the matched PUF adds its delay difference to the same arbiter
// path as the template segment it stands for.
//
// In an arbiter PUF the sign with which segment i reaches the arbiter is
// the parity of its own and all later challenge bits. For the template that
// sign is st[i] = ^c_t[N-1:i]. The wanted signs of the matched PUF are:
// original segment i -> st[i]; PDL slot s -> st[slot_map[s]] (the template
// segment it completes); an unused slot -> the sign of the segment after
// it, so its bit is 0. Working from the last segment to the first, each
// bit is the XOR of the wanted sign of its segment and of the segment after
// it: c[m] = want[m] ^ want[m+1], with want[N+NP] = 0. This is the
// right-to-left reassignment of the matching scheme; the parity
// formulation is how this design computes it in one combinational pass.
//
// Interface: c_t template challenge (bit 0 = first segment), slot_valid /
// slot_map from match_config, c_ext matched-PUF challenge (bits 0..N-1
// original segments, N.. PDL slots). Timing: combinational.
module challenge_reassign #(
  parameter int N  = 64,
  parameter int NP = N
) (
  input  logic [N-1:0]          c_t,
  input  logic [NP-1:0]         slot_valid,
  input  logic [$clog2(N)-1:0]  slot_map [NP],
  output logic [N+NP-1:0]       c_ext
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N-1:0]    st;    // template segment signs
  logic [N+NP:0]   want;  // wanted signs of the matched PUF segments

  always_comb begin
    st[N-1] = c_t[N-1];
    for (int i = N - 2; i >= 0; i--) st[i] = st[i+1] ^ c_t[i];
  end

  always_comb begin
    want[N+NP] = 1'b0;
    for (int s = NP - 1; s >= 0; s--)
      want[N+s] = slot_valid[s] ? st[slot_map[s]] : want[N+s+1];
    want[N-1:0] = st;
    for (int m = 0; m < N + NP; m++) c_ext[m] = want[m] ^ want[m+1];
  end
endmodule
