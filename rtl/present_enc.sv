// present_enc: round-based PRESENT encryption core for an 80-, 128- or
// 256-bit key (KEY_W) and a 64-bit block.
//
// A 64-bit state register and a KEY_W-bit key register are updated together
// once per clock. Each round XORs the top 64 bits of the key register (the
// round key) into the state, applies the 16 S-boxes and the P-layer, while the
// key updation unit (present_kuu) moves the key register to the next round
// key under a round counter that counts 1 .. ROUNDS-1. After the last round
// the remaining round key is XORed onto the state combinationally, so
// ct = state ^ key[KEY_W-1 -: 64]; uk is the final key register, the
// "updated key" that a decryption core starts from.
//
// Interface and timing: ld loads the input text and starts; kld loads the key
// (assert both together for a new block; ld without kld reuses the key
// register as it stands). One clock for the load plus ROUNDS-1 round clocks:
// ct, uk and done are valid ROUNDS (32) clocks after the ld edge, and stay
// valid until the next ld. busy is high while rounds run. rst_n is active
// low and clears every register. The register/round structure follows the
// described architecture; the done/busy flags are this design's own.
module present_enc
  import present_pkg::*;
#(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned ROUNDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             kld,
  input  block_t           it,
  input  logic [KEY_W-1:0] k,
  output block_t           ct,
  output logic [KEY_W-1:0] uk,
  output logic             busy,
  output logic             done
);

  localparam int unsigned RC_W = $clog2(ROUNDS);

  block_t           state_q;
  logic [KEY_W-1:0] key_q, ukr;
  logic [RC_W-1:0]  rc_q;
  block_t           sbox_in, pl_out;

  assign sbox_in = state_q ^ key_q[KEY_W-1 -: BLOCK_W];
  assign pl_out  = p_layer(sbox_layer(sbox_in));

  present_kuu #(.KEY_W(KEY_W), .RC_W(RC_W)) u_kuu (
    .key_in (key_q),
    .rc     (rc_q),
    .key_out(ukr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      key_q   <= '0;
      rc_q    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      if (kld) key_q <= k;
      if (ld) begin
        state_q <= it;
        rc_q    <= RC_W'(1);
        busy    <= 1'b1;
        done    <= 1'b0;
      end else if (busy) begin
        state_q <= pl_out;
        if (!kld) key_q <= ukr;
        rc_q    <= rc_q + 1'b1;
        if (rc_q == RC_W'(ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = sbox_in;
  assign uk = key_q;

endmodule
