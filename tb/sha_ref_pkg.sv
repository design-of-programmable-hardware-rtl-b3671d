// sha_ref_pkg: software SHA-256 for testbenches, written straight from
// FIPS 180-4 as a loop over padded 512-bit blocks. Messages up to 1024
// bits, given as the low `len` bits of `m` (first bit most significant).
package sha_ref_pkg;
  function automatic logic [31:0] ror(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [255:0] sha256(logic [1023:0] m, int len);
    logic [31:0] k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
      32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
      32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
      32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
      32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
      32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    logic [31:0] h [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                           32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    logic [2047:0] s;
    logic [31:0] w [64];
    logic [31:0] va, vb, vc, vd, ve, vf, vg, vh, t1, t2;
    int nb;
    nb = (len + 64) / 512 + 1;
    s = '0;
    for (int i = 0; i < len; i++) s[nb*512 - len + i] = m[i];
    s[nb*512 - len - 1] = 1'b1;
    s[63:0] = 64'(len);
    for (int b = 0; b < nb; b++) begin
      for (int t = 0; t < 16; t++) w[t] = s[nb*512 - 1 - 512*b - 32*t -: 32];
      for (int t = 16; t < 64; t++)
        w[t] = w[t-16] + (ror(w[t-15], 7) ^ ror(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-7]
             + (ror(w[t-2], 17) ^ ror(w[t-2], 19) ^ (w[t-2] >> 10));
      {va, vb, vc, vd, ve, vf, vg, vh} = {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
      for (int t = 0; t < 64; t++) begin
        t1 = vh + (ror(ve, 6) ^ ror(ve, 11) ^ ror(ve, 25)) + ((ve & vf) ^ (~ve & vg)) + k[t] + w[t];
        t2 = (ror(va, 2) ^ ror(va, 13) ^ ror(va, 22)) + ((va & vb) ^ (va & vc) ^ (vb & vc));
        vh = vg; vg = vf; vf = ve; ve = vd + t1; vd = vc; vc = vb; vb = va; va = t1 + t2;
      end
      h[0] += va; h[1] += vb; h[2] += vc; h[3] += vd; h[4] += ve; h[5] += vf; h[6] += vg; h[7] += vh;
    end
    return {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
  endfunction
endpackage
