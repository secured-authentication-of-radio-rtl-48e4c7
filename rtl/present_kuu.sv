// present_kuu: key updation unit (KUU) of PRESENT, one forward key-schedule
// step for an 80-, 128- or 256-bit key register.
//
// The key register is rotated left by 61 bit positions (equivalently, the
// lowest KEY_W-61 bits move to the top), the top nibble (80-bit key) or the
// top two nibbles (128/256-bit key) go through the PRESENT S-box, and the
// round counter is XORed into a fixed field: bits [19:15], [66:62] or
// [128:124]. The 80/128 geometry is the standard PRESENT one; the 256-bit
// geometry is the one proposed for PRESENT-256. The counter field is RC_W
// bits wide starting at that position, so a 16- or 64-round build uses a
// 4- or 6-bit field there (a choice of this design).
//
// Purely combinational: key_out follows key_in and rc in the same cycle.
module present_kuu
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
    $error("present_kuu: KEY_W must be 80, 128 or 256");
  end

  localparam int unsigned RC_LSB = rc_lsb(KEY_W);
  localparam int unsigned NSBOX  = key_sboxes(KEY_W);

  always_comb begin
    logic [KEY_W-1:0] ks;
    ks = {key_in[KEY_W-ROT-1:0], key_in[KEY_W-1:KEY_W-ROT]};
    for (int s = 0; s < NSBOX; s++)
      ks[KEY_W-4*(s+1) +: 4] = sbox4(ks[KEY_W-4*(s+1) +: 4]);
    ks[RC_LSB +: RC_W] = ks[RC_LSB +: RC_W] ^ rc;
    key_out = ks;
  end

endmodule
