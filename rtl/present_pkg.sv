// present_pkg: shared constants and combinational functions of the PRESENT
// block cipher (64-bit block, 80/128/256-bit key).
//
// The 4-bit S-box, its inverse, the 64-bit bit permutation (P-layer) and its
// inverse are the standard PRESENT ones. The key-schedule geometry (where the
// round counter is XORed in and how many key nibbles pass through the S-box)
// follows the key updation unit described for the three key sizes: one S-box
// and the counter at bits [19:15] for 80-bit keys, two S-boxes and bits
// [66:62] for 128-bit keys, two S-boxes and bits [128:124] for 256-bit keys.
// All functions are pure combinational logic; nothing here holds state.
package present_pkg;

  localparam int unsigned BLOCK_W = 64;
  localparam int unsigned ROT     = 61;  // key register rotation per round

  typedef logic [BLOCK_W-1:0] block_t;

  // Encryption-direction mode of the ECB unit.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } cipher_mode_e;

  function automatic logic [3:0] sbox4(input logic [3:0] x);
    case (x)
      4'h0: sbox4 = 4'hC;  4'h1: sbox4 = 4'h5;  4'h2: sbox4 = 4'h6;  4'h3: sbox4 = 4'hB;
      4'h4: sbox4 = 4'h9;  4'h5: sbox4 = 4'h0;  4'h6: sbox4 = 4'hA;  4'h7: sbox4 = 4'hD;
      4'h8: sbox4 = 4'h3;  4'h9: sbox4 = 4'hE;  4'hA: sbox4 = 4'hF;  4'hB: sbox4 = 4'h8;
      4'hC: sbox4 = 4'h4;  4'hD: sbox4 = 4'h7;  4'hE: sbox4 = 4'h1;  default: sbox4 = 4'h2;
    endcase
  endfunction

  function automatic logic [3:0] inv_sbox4(input logic [3:0] x);
    case (x)
      4'h0: inv_sbox4 = 4'h5;  4'h1: inv_sbox4 = 4'hE;  4'h2: inv_sbox4 = 4'hF;  4'h3: inv_sbox4 = 4'h8;
      4'h4: inv_sbox4 = 4'hC;  4'h5: inv_sbox4 = 4'h1;  4'h6: inv_sbox4 = 4'h2;  4'h7: inv_sbox4 = 4'hD;
      4'h8: inv_sbox4 = 4'hB;  4'h9: inv_sbox4 = 4'h4;  4'hA: inv_sbox4 = 4'h6;  4'hB: inv_sbox4 = 4'h3;
      4'hC: inv_sbox4 = 4'h0;  4'hD: inv_sbox4 = 4'h7;  4'hE: inv_sbox4 = 4'h9;  default: inv_sbox4 = 4'hA;
    endcase
  endfunction

  // 16 S-boxes in parallel over the 64-bit state.
  function automatic block_t sbox_layer(input block_t x);
    block_t y;
    for (int i = 0; i < 16; i++) y[4*i +: 4] = sbox4(x[4*i +: 4]);
    return y;
  endfunction

  function automatic block_t inv_sbox_layer(input block_t x);
    block_t y;
    for (int i = 0; i < 16; i++) y[4*i +: 4] = inv_sbox4(x[4*i +: 4]);
    return y;
  endfunction

  // P-layer: bit i moves to bit 16*i mod 63, bit 63 stays.
  function automatic block_t p_layer(input block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[(i == 63) ? 63 : ((16 * i) % 63)] = x[i];
    return y;
  endfunction

  function automatic block_t inv_p_layer(input block_t x);
    block_t y;
    for (int i = 0; i < 64; i++) y[i] = x[(i == 63) ? 63 : ((16 * i) % 63)];
    return y;
  endfunction

  // Lowest key-register bit that the round counter is XORed into.
  function automatic int unsigned rc_lsb(input int unsigned key_w);
    case (key_w)
      80:      return 15;
      128:     return 62;
      default: return 124;  // 256
    endcase
  endfunction

  // Number of key nibbles (from the top) passed through the S-box per round.
  function automatic int unsigned key_sboxes(input int unsigned key_w);
    return (key_w == 80) ? 1 : 2;
  endfunction

endpackage
