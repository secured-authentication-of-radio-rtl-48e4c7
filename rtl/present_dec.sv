// present_dec: round-based PRESENT decryption core for an 80-, 128- or
// 256-bit key (KEY_W) and a 64-bit block.
//
// It runs present_enc backwards. It is loaded with the cipher text and with
// the updated key that encryption leaves in its key register (the last round
// key register). Each clock XORs the top 64 key bits into the state, applies
// the inverse P-layer and the inverse S-boxes, and steps the key register back
// one round with the inverse key updation unit (present_ikuu) while the round
// counter counts ROUNDS-1 down to 1. The first round key is XORed on at the
// end combinationally: ot = state ^ key[KEY_W-1 -: 64], and iuk is then the
// original key.
//
// Interface and timing: ld loads ct and starts, kld loads uk (assert both
// together). ot, iuk and done are valid ROUNDS (32) clocks after the ld edge
// and stay valid until the next ld. rst_n is active low. The done/busy flags
// are this design's own.
module present_dec
  import present_pkg::*;
#(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned ROUNDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             kld,
  input  block_t           ct,
  input  logic [KEY_W-1:0] uk,
  output block_t           ot,
  output logic [KEY_W-1:0] iuk,
  output logic             busy,
  output logic             done
);

  localparam int unsigned RC_W = $clog2(ROUNDS);

  block_t           state_q;
  logic [KEY_W-1:0] key_q, iukr;
  logic [RC_W-1:0]  rc_q;
  block_t           x, round_out;

  assign x         = state_q ^ key_q[KEY_W-1 -: BLOCK_W];
  assign round_out = inv_sbox_layer(inv_p_layer(x));

  present_ikuu #(.KEY_W(KEY_W), .RC_W(RC_W)) u_ikuu (
    .key_in (key_q),
    .rc     (rc_q),
    .key_out(iukr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= '0;
      rc_q    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      if (kld) key_q <= uk;
      if (ld) begin
        state_q <= ct;
        rc_q    <= RC_W'(ROUNDS - 1);
        busy    <= 1'b1;
        done    <= 1'b0;
      end else if (busy) begin
        state_q <= round_out;
        if (!kld) key_q <= iukr;
        rc_q    <= rc_q - 1'b1;
        if (rc_q == RC_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ot  = x;
  assign iuk = key_q;

endmodule
