// present_ecb: PRESENT in electronic codebook (ECB) mode on two 64-bit blocks
// at once, with one key: (CT_1, CT_2) = ENC(IT_1, IT_2) or
// (OT_1, OT_2) = DEC(CT_1, CT_2).
//
// Two present_enc cores and two present_dec cores work in parallel, one per
// block. Encryption loads both encryption cores and waits ROUNDS clocks.
// Decryption needs the updated key (the last round key) to start from; the
// unit derives it from the key by first running encryption core 1 (its key
// path is all that matters), then loads both decryption cores with the two
// blocks and that updated key. The blocks are held in registers meanwhile.
// Deriving the updated key before every decryption is this design's way of
// letting both directions take "the same key K".
//
// Interface and timing: start (one clock, ignored while busy) samples
// decrypt, key, din1 and din2. Encryption ends ROUNDS+1 clocks later (33),
// decryption 2*ROUNDS+1 clocks later (65); done is then a one-clock pulse and
// dout1/dout2 hold the result until the next operation ends. rst_n is active
// low.
module present_ecb
  import present_pkg::*;
#(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned ROUNDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             decrypt,
  input  logic [KEY_W-1:0] key,
  input  block_t           din1,
  input  block_t           din2,
  output block_t           dout1,
  output block_t           dout2,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_ENC,   // both encryption cores running
    S_KEYX,  // encryption core 1 deriving the updated key
    S_DEC    // both decryption cores running
  } ecb_state_e;

  ecb_state_e       state_q;
  block_t           hold1_q, hold2_q;
  logic             enc_ld, dec_ld;
  block_t           ct1, ct2, ot1, ot2;
  logic [KEY_W-1:0] uk1, uk2, iuk1, iuk2;
  logic             enc1_busy, enc2_busy, dec1_busy, dec2_busy;
  logic             enc1_done, enc2_done, dec1_done, dec2_done;
  logic             go;

  assign go     = start && (state_q == S_IDLE);
  assign enc_ld = go;
  assign dec_ld = (state_q == S_KEYX) && enc1_done;

  present_enc #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_enc1 (
    .clk, .rst_n, .ld(enc_ld), .kld(enc_ld), .it(din1), .k(key),
    .ct(ct1), .uk(uk1), .busy(enc1_busy), .done(enc1_done)
  );
  present_enc #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_enc2 (
    .clk, .rst_n, .ld(enc_ld), .kld(enc_ld), .it(din2), .k(key),
    .ct(ct2), .uk(uk2), .busy(enc2_busy), .done(enc2_done)
  );
  present_dec #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_dec1 (
    .clk, .rst_n, .ld(dec_ld), .kld(dec_ld), .ct(hold1_q), .uk(uk1),
    .ot(ot1), .iuk(iuk1), .busy(dec1_busy), .done(dec1_done)
  );
  present_dec #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_dec2 (
    .clk, .rst_n, .ld(dec_ld), .kld(dec_ld), .ct(hold2_q), .uk(uk1),
    .ot(ot2), .iuk(iuk2), .busy(dec2_busy), .done(dec2_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      hold1_q <= '0;
      hold2_q <= '0;
      dout1   <= '0;
      dout2   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (go) begin
          hold1_q <= din1;
          hold2_q <= din2;
          state_q <= decrypt ? S_KEYX : S_ENC;
        end
        S_ENC: if (enc1_done && enc2_done) begin
          dout1   <= ct1;
          dout2   <= ct2;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        S_KEYX: if (enc1_done) state_q <= S_DEC;
        S_DEC: if (dec1_done && dec2_done) begin
          dout1   <= ot1;
          dout2   <= ot2;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // The two cores of a pair are started together and must finish together.
  a_enc_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_ENC) |-> (enc1_busy == enc2_busy));
  a_dec_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_DEC) |-> (dec1_busy == dec2_busy));

endmodule
