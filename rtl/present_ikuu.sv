// present_ikuu: inverse key updation unit (IKUU) of PRESENT, one backward
// key-schedule step for an 80-, 128- or 256-bit key register.
//
// It undoes present_kuu: the top one or two nibbles go through the inverse
// S-box, the round counter is XORed into the same field the KUU uses
// ([19:15], [66:62] or [128:124]), and the register is then rotated right by
// 61 positions. Given the key that present_kuu produced for counter value rc,
// it returns the key present_kuu started from. Purely combinational.
module present_ikuu
  import present_pkg::*;
#(
  parameter int unsigned KEY_W = 128,
  parameter int unsigned RC_W  = 5
) (
  input  logic [KEY_W-1:0] key_in,
  input  logic [RC_W-1:0]  rc,
  output logic [KEY_W-1:0] key_out
);

  if (!(KEY_W == 80 || KEY_W == 128 || KEY_W == 256)) begin : g_bad_key_w
    $error("present_ikuu: KEY_W must be 80, 128 or 256");
  end

  localparam int unsigned RC_LSB = rc_lsb(KEY_W);
  localparam int unsigned NSBOX  = key_sboxes(KEY_W);

  always_comb begin
    logic [KEY_W-1:0] ks;
    ks = key_in;
    for (int s = 0; s < NSBOX; s++)
      ks[KEY_W-4*(s+1) +: 4] = inv_sbox4(ks[KEY_W-4*(s+1) +: 4]);
    ks[RC_LSB +: RC_W] = ks[RC_LSB +: RC_W] ^ rc;
    key_out = {ks[ROT-1:0], ks[KEY_W-1:ROT]};
  end

endmodule
