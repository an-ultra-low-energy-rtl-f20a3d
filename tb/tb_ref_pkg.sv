// Reference model shared by the platform testbenches, written apart from
// the RTL: the LUT delay formula, the exhaustive PDL configuration search
// (same tie order as the hardware: lowest cu, then cl, then LUT count) and
// the response of a matched party computed from its effective segment
// delay differences (original difference plus the PDL segment that the
// reassigned challenge puts on the same path).
package tb_ref_pkg;
  timeunit 1ps;
  timeprecision 1fs;
  localparam int MAXN = 64;

  function automatic longint lut_fs(int c);
    return 64'd1_248_000 + (64'd11_000 * c) / 31;
  endfunction

  // Delay difference the best PDL setting adds for a wanted difference.
  function automatic longint pdl_best_fs(longint target);
    longint best_e, best_d, d, e;
    best_e = 64'h7fff_ffff_ffff_ffff;
    best_d = 0;
    for (int cu = 0; cu < 32; cu++)
      for (int cl = 0; cl < 32; cl++)
        for (int m = 1; m <= 4; m++) begin
          d = m * (lut_fs(cu) - lut_fs(cl));
          e = (d > target) ? d - target : target - d;
          if (e < best_e) begin
            best_e = e;
            best_d = d;
          end
        end
    return best_d;
  endfunction

  // Effective differences of a party: own[i] raised towards max(own, other).
  function automatic void effective(input longint own [MAXN], input longint other [MAXN],
                                    input int n, output longint eff [MAXN], output int slots);
    slots = 0;
    for (int i = 0; i < n; i++) begin
      eff[i] = own[i];
      if (other[i] > own[i]) begin
        eff[i] = own[i] + pdl_best_fs(other[i] - own[i]);
        slots++;
      end
    end
  endfunction

  // Response of an arbiter PUF with differences d to template challenge c:
  // segment i counts with sign (-1)^(c[i] ^ ... ^ c[n-1]); 1 if sum > 0.
  function automatic bit respond(input longint d [MAXN], input int n, input logic [MAXN-1:0] c);
    longint sum;
    bit p;
    sum = 0;
    p = 0;
    for (int i = n - 1; i >= 0; i--) begin
      p ^= c[i];
      sum += p ? -d[i] : d[i];
    end
    return sum > 0;
  endfunction
endpackage
