// present_ref_pkg: reference model of PRESENT for the testbenches.
//
// Written independently of the RTL: keys are handled as 256-bit vectors with
// a run-time key width, the S-box is a table, its inverse is found by search,
// the P-layer uses the bit-position formula P(4*j+b) = j + 16*b, rotations
// are done bit by bit, and decryption replays the round keys in reverse
// order instead of running an inverse key schedule.
package present_ref_pkg;

  typedef logic [255:0] key256_t;

  localparam logic [3:0] SBOX_T [16] = '{
    4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
    4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2
  };

  function automatic logic [3:0] s_inv(input logic [3:0] y);
    for (int v = 0; v < 16; v++) if (SBOX_T[v] == y) return 4'(v);
    return 4'h0;
  endfunction

  function automatic logic [63:0] sub(input logic [63:0] x, input bit inverse);
    logic [63:0] y;
    for (int n = 0; n < 16; n++)
      y[4*n +: 4] = inverse ? s_inv(x[4*n +: 4]) : SBOX_T[x[4*n +: 4]];
    return y;
  endfunction

  function automatic logic [63:0] perm(input logic [63:0] x, input bit inverse);
    logic [63:0] y;
    for (int j = 0; j < 16; j++)
      for (int b = 0; b < 4; b++)
        if (inverse) y[4*j + b] = x[j + 16*b];
        else         y[j + 16*b] = x[4*j + b];
    return y;
  endfunction

  function automatic int unsigned rc_pos(input int unsigned key_w);
    return (key_w == 80) ? 15 : (key_w == 128) ? 62 : 124;
  endfunction

  // One forward key-schedule step with counter value rc (rc_w bits wide).
  function automatic key256_t kstep(input key256_t k, input int unsigned key_w,
                                    input int unsigned rc, input int unsigned rc_w);
    key256_t r;
    r = '0;
    for (int i = 0; i < int'(key_w); i++) r[(i + 61) % key_w] = k[i];
    r[key_w-1 -: 4] = SBOX_T[r[key_w-1 -: 4]];
    if (key_w != 80) r[key_w-5 -: 4] = SBOX_T[r[key_w-5 -: 4]];
    for (int b = 0; b < int'(rc_w); b++) r[rc_pos(key_w) + b] ^= rc[b];
    return r;
  endfunction

  // One backward key-schedule step (inverse of kstep), by search-free algebra.
  function automatic key256_t kstep_inv(input key256_t k, input int unsigned key_w,
                                        input int unsigned rc, input int unsigned rc_w);
    key256_t t, r;
    t = k;
    for (int b = 0; b < int'(rc_w); b++) t[rc_pos(key_w) + b] ^= rc[b];
    t[key_w-1 -: 4] = s_inv(t[key_w-1 -: 4]);
    if (key_w != 80) t[key_w-5 -: 4] = s_inv(t[key_w-5 -: 4]);
    r = '0;
    for (int i = 0; i < int'(key_w); i++) r[i] = t[(i + 61) % key_w];
    return r;
  endfunction

  function automatic int unsigned clog2(input int unsigned n);
    int unsigned w = 0;
    while ((1 << w) < n) w++;
    return w;
  endfunction

  // Last key register value after encryption (the "updated key").
  function automatic key256_t final_key(input key256_t k, input int unsigned key_w,
                                        input int unsigned rounds = 32);
    for (int i = 1; i < int'(rounds); i++) k = kstep(k, key_w, i, clog2(rounds));
    return k;
  endfunction

  function automatic logic [63:0] encrypt(input logic [63:0] p, input key256_t k,
                                          input int unsigned key_w,
                                          input int unsigned rounds = 32);
    logic [63:0] s = p;
    for (int i = 1; i < int'(rounds); i++) begin
      s = perm(sub(s ^ k[key_w-1 -: 64], 0), 0);
      k = kstep(k, key_w, i, clog2(rounds));
    end
    return s ^ k[key_w-1 -: 64];
  endfunction

  function automatic logic [63:0] decrypt(input logic [63:0] c, input key256_t k,
                                          input int unsigned key_w,
                                          input int unsigned rounds = 32);
    logic [63:0] rk [64];
    logic [63:0] s = c;
    for (int i = 1; i <= int'(rounds); i++) begin
      rk[i-1] = k[key_w-1 -: 64];
      k = kstep(k, key_w, i, clog2(rounds));
    end
    s = s ^ rk[rounds-1];
    for (int i = int'(rounds) - 2; i >= 0; i--) s = sub(perm(s, 1), 1) ^ rk[i];
    return s;
  endfunction

endpackage
