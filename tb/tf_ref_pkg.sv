// tf_ref_pkg: reference model for the track-fitter testbenches.
//
// Gives the constant sets the test memory returns for a sector (a fixed
// hash of sector, row and layer), and computes chi2 and the helix parameters
// of a hit vector with plain wide-integer arithmetic, independently of the
// pipelined RTL.
package tf_ref_pkg;
  import tf_pkg::*;

  function automatic int hash3(input int a, input int b, input int c);
    int unsigned h;
    h = 32'h9e3779b9 ^ (a * 32'h85ebca6b) ^ (b * 32'hc2b2ae35) ^ (c * 32'h27d4eb2f);
    h ^= h >> 15;
    h *= 32'h2c1b3c6d;
    h ^= h >> 12;
    return int'(h & 32'h7fffffff);
  endfunction

  // chi2 slopes within +-1/16, offsets within +-2 (COEF_FRAC = 8)
  function automatic chi2_const_t ref_chi2_const(input int sector);
    chi2_const_t k;
    for (int j = 0; j < NDOF; j++) begin
      for (int l = 0; l < NLAYERS; l++)
        k.s[j][l] = coef_t'((hash3(sector, j, l) % 33) - 16);
      k.h[j] = offs_t'((hash3(sector, j, 99) % 1025) - 512);
    end
    return k;
  endfunction

  // parameter slopes within +-1/2, offsets within +-32
  function automatic par_const_t ref_par_const(input int sector);
    par_const_t k;
    for (int i = 0; i < NPAR; i++) begin
      for (int l = 0; l < NLAYERS; l++)
        k.c[i][l] = coef_t'((hash3(sector + 7777, i, l) % 257) - 128);
      k.q[i] = offs_t'((hash3(sector + 7777, i, 99) % 16385) - 8192);
    end
    return k;
  endfunction

  // chi2 with 2*COEF_FRAC fraction bits
  function automatic logic signed [127:0] ref_chi2_full(input hit_t x [NLAYERS],
                                                        input chi2_const_t k);
    logic signed [127:0] sum, r;
    sum = 0;
    for (int j = 0; j < NDOF; j++) begin
      r = 128'(k.h[j]);
      for (int l = 0; l < NLAYERS; l++) r += 128'(k.s[j][l]) * 128'(x[l]);
      sum += r * r;
    end
    return sum;
  endfunction

  function automatic fix16_t ref_sat(input logic signed [127:0] v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return fix16_t'(v);
  endfunction

  function automatic fix16_t ref_chi2_out(input logic signed [127:0] full);
    return ref_sat(full >>> COEF_FRAC);
  endfunction

  function automatic bit ref_pass(input logic signed [127:0] full, input fix16_t thr);
    return full <= (128'(thr) <<< COEF_FRAC);
  endfunction

  function automatic fix16_t ref_param(input hit_t x [NLAYERS], input par_const_t k,
                                       input int i);
    logic signed [127:0] p;
    p = 128'(k.q[i]);
    for (int l = 0; l < NLAYERS; l++) p += 128'(k.c[i][l]) * 128'(x[l]);
    return ref_sat(p);
  endfunction

endpackage
