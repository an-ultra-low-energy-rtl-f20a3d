// Shared types, constants and delay models of the matched-PUF platform.
//
// Delays are carried as signed integers in femtoseconds. Two delay models
// live here because several blocks and testbenches must agree on them:
//
//  * lut_delay_fs: propagation delay of one LUT6 used as an inverter on its
//    top input, as a function of the five configuration inputs. The span
//    (1.248 ns for 00000, 1.259 ns for 11111, 11 ps apart) follows the
//    measured LUT delays of the platform; the monotonic, evenly stepped shape
//    in between is this design's own choice (the measured map is irregular).
//  * seg_delay_fs: the process-variation model of the delays of an arbiter
//    PUF segment. It is a fixed hash of a per-device seed and the segment
//    index, spread +/- SEG_VAR_FS around the LUT delay. It stands in for
//    silicon and exists only so the behavioural PUF model and the
//    testbenches see the same "device".
//
// A PDL segment (pdl_cfg_t) holds the selection bits of its upper LUTs
// (cu), of its lower LUTs (cl) and how many LUTs are chained on each side
// (luts). luts = 0 means the slot is unused and adds no delay.
package puf_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int CFG_BITS    = 5;          // LUT6 minus the signal input
  localparam int MAX_LUTS    = 4;          // LUTs per side of one PDL segment
  localparam int LUTS_W      = 3;          // width of the LUT count field
  localparam int LUT_BASE_FS = 1_248_000;  // delay with configuration 00000
  localparam int LUT_SPAN_FS = 11_000;     // extra delay with configuration 11111
  localparam int SEG_VAR_FS  = 10_000;     // +/- spread of a PUF segment delay

  typedef logic signed [31:0]  delay_t;
  typedef logic [CFG_BITS-1:0] cfg_t;

  typedef struct packed {
    cfg_t              cu;    // selection bits of the upper-path LUTs
    cfg_t              cl;    // selection bits of the lower-path LUTs
    logic [LUTS_W-1:0] luts;  // LUTs per side, 0 = unused slot
  } pdl_cfg_t;

  // Operations of the protocol engine.
  typedef enum logic [2:0] {
    OP_ENCRYPT     = 3'd0,  // R = E(c) ^ m with a fresh random c
    OP_DECRYPT     = 3'd1,  // m = E(c) ^ R with the received c
    OP_AUTH_ISSUE  = 3'd2,  // verifier: fresh c, keep E(c), publish c
    OP_AUTH_ANSWER = 3'd3,  // prover: R' = E(c) for the received c
    OP_AUTH_CHECK  = 3'd4   // verifier: compare kept E(c) with R'
  } op_t;

  function automatic delay_t lut_delay_fs(cfg_t c);
    return delay_t'(LUT_BASE_FS + (LUT_SPAN_FS * int'(c)) / 31);
  endfunction

  // Delay difference (upper minus lower) of a configured PDL segment.
  function automatic delay_t pdl_diff_fs(pdl_cfg_t p);
    return delay_t'(int'(p.luts) * (lut_delay_fs(p.cu) - lut_delay_fs(p.cl)));
  endfunction

  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] h;
    h = x ^ (x >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    return h ^ (h >> 16);
  endfunction

  // Delay of the upper (side 0) or lower (side 1) element of segment seg
  // of the PUF identified by seed.
  function automatic delay_t seg_delay_fs(int seed, int seg, bit side);
    logic [31:0] h;
    h = mix32(mix32(32'(seed)) ^ 32'(seg * 2 + int'(side)) * 32'h9e3779b9);
    return delay_t'(LUT_BASE_FS + int'(h % 32'(2 * SEG_VAR_FS + 1)) - SEG_VAR_FS);
  endfunction

  // Segment delay difference d^0 - d^1 (Eq. 1 of the matching scheme).
  function automatic delay_t seg_diff_fs(int seed, int seg);
    return seg_delay_fs(seed, seg, 1'b0) - seg_delay_fs(seed, seg, 1'b1);
  endfunction
endpackage
