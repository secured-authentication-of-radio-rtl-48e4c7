// rfid_reader: the reader side of the secured RFID authentication.
//
// A pulse on start begins a session. Stage 1, tag recognition: the reader
// sends MSG_REQ_ID, decrypts the ENC(ID) word of the tag's MSG_ID answer and
// recognises the tag when the result equals the ID word (tag_ok). Only a
// recognised tag is taken to stage 2: the reader sends MSG_REQ_AUTH, takes
// R_1 from the tag's MSG_R1, draws R_2, computes the challenge
// (Ch_1, Ch_2) = DEC(R_1, R_2) and sends it as MSG_CH. On the tag's MSG_RS it
// computes (RR_1, RR_2) = DEC(RS_1, RS_2) and authenticates the tag when
// RR_1 equals R_2 (t_a), as the protocol specifies. Because RS_1 = ENC(R_3),
// RR_1 is the tag's R_3, so this check passes only when R_3 equals R_2.
// MSG_REJECT from the tag ends the session without tag authentication.
//
// R_2 comes from the reader's own rng64 unless rn_ext is high (then rn2_ext).
// done rises when a session ends (recognition failed, rejected, or tag
// checked) and stays high with the results until the next start. Each ECB
// decryption takes 2*ROUNDS+1 clocks (65). The message encoding and the
// done flag are this design's own.
module rfid_reader
  import present_pkg::*;
  import rfid_pkg::*;
#(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned ROUNDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KEY_W-1:0] key,
  // random source
  input  logic             seed_ld,
  input  logic [63:0]      seed,
  input  logic             rn_ext,
  input  logic [63:0]      rn2_ext,
  // link from / to the tag
  input  logic             rx_valid,
  input  rfid_msg_t        rx_msg,
  output logic             tx_valid,
  output rfid_msg_t        tx_msg,
  // results
  output logic             done,
  output logic             tag_ok,   // stage 1: tag recognised
  output logic             t_a,      // stage 2: tag authenticated
  output block_t           r2,
  output block_t           ch1,
  output block_t           ch2,
  output block_t           rr1,
  output block_t           rr2
);

  typedef enum logic [2:0] {
    R_IDLE,
    R_WAIT_ID,   // identification requested
    R_ID_DEC,    // decrypting ENC(ID)
    R_WAIT_R1,   // authentication requested
    R_CH_DEC,    // decrypting R_1, R_2 into the challenge
    R_WAIT_RS,   // challenge sent
    R_RR_DEC     // decrypting RS_1, RS_2
  } reader_state_e;

  reader_state_e state_q;
  block_t        id_q;
  logic          rng_next;
  block_t        rnd;
  logic          ecb_start, ecb_busy, ecb_done;
  block_t        ecb_in1, ecb_in2, ecb_out1, ecb_out2;
  logic          rx_id, rx_r1, rx_rs, rx_reject;

  assign rx_id     = rx_valid && rx_msg.kind == MSG_ID;
  assign rx_r1     = rx_valid && rx_msg.kind == MSG_R1;
  assign rx_rs     = rx_valid && rx_msg.kind == MSG_RS;
  assign rx_reject = rx_valid && rx_msg.kind == MSG_REJECT;

  rng64 #(.RESET_SEED(64'h6A09_E667_F3BC_C908)) u_rng (
    .clk, .rst_n, .seed_ld, .seed, .next(rng_next), .rnd
  );

  present_ecb #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_ecb (
    .clk, .rst_n, .start(ecb_start), .decrypt(1'b1), .key,
    .din1(ecb_in1), .din2(ecb_in2), .dout1(ecb_out1), .dout2(ecb_out2),
    .busy(ecb_busy), .done(ecb_done)
  );

  always_comb begin
    ecb_start = 1'b0;
    ecb_in1   = rx_msg.w1;
    ecb_in2   = rx_msg.w2;
    rng_next  = 1'b0;
    unique case (state_q)
      R_WAIT_ID: if (rx_id) begin
        ecb_start = 1'b1;
        ecb_in1   = rx_msg.w2;
        ecb_in2   = rx_msg.w2;
      end
      R_WAIT_R1: if (rx_r1) begin
        ecb_start = 1'b1;
        ecb_in2   = rn_ext ? rn2_ext : rnd;
        rng_next  = !rn_ext;
      end
      R_WAIT_RS: ecb_start = rx_rs;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= R_IDLE;
      id_q     <= '0;
      tx_valid <= 1'b0;
      tx_msg   <= '{kind: MSG_REQ_ID, w1: '0, w2: '0};
      done     <= 1'b0;
      tag_ok   <= 1'b0;
      t_a      <= 1'b0;
      r2       <= '0;
      ch1      <= '0;
      ch2      <= '0;
      rr1      <= '0;
      rr2      <= '0;
    end else begin
      tx_valid <= 1'b0;
      unique case (state_q)
        R_IDLE: if (start) begin
          done     <= 1'b0;
          tag_ok   <= 1'b0;
          t_a      <= 1'b0;
          tx_valid <= 1'b1;
          tx_msg   <= '{kind: MSG_REQ_ID, w1: '0, w2: '0};
          state_q  <= R_WAIT_ID;
        end
        R_WAIT_ID: if (rx_id) begin
          id_q    <= rx_msg.w1;
          state_q <= R_ID_DEC;
        end
        R_ID_DEC: if (ecb_done) begin
          if (ecb_out1 == id_q) begin
            tag_ok   <= 1'b1;
            tx_valid <= 1'b1;
            tx_msg   <= '{kind: MSG_REQ_AUTH, w1: '0, w2: '0};
            state_q  <= R_WAIT_R1;
          end else begin
            done    <= 1'b1;
            state_q <= R_IDLE;
          end
        end
        R_WAIT_R1: if (rx_r1) begin
          r2      <= ecb_in2;
          state_q <= R_CH_DEC;
        end
        R_CH_DEC: if (ecb_done) begin
          ch1      <= ecb_out1;
          ch2      <= ecb_out2;
          tx_valid <= 1'b1;
          tx_msg   <= '{kind: MSG_CH, w1: ecb_out1, w2: ecb_out2};
          state_q  <= R_WAIT_RS;
        end
        R_WAIT_RS: begin
          if (rx_rs) state_q <= R_RR_DEC;
          else if (rx_reject) begin
            done    <= 1'b1;
            state_q <= R_IDLE;
          end
        end
        R_RR_DEC: if (ecb_done) begin
          rr1     <= ecb_out1;
          rr2     <= ecb_out2;
          t_a     <= (ecb_out1 == r2);
          done    <= 1'b1;
          state_q <= R_IDLE;
        end
        default: state_q <= R_IDLE;
      endcase
    end
  end

  a_ecb_idle: assert property (@(posedge clk) disable iff (!rst_n)
    ecb_start |-> !ecb_busy);

endmodule
