// rfid_tag: the tag side of the secured RFID authentication.
//
// Stage 1, tag recognition: on MSG_REQ_ID the tag draws a 64-bit
// identification word ID from its RNG64, encrypts it with PRESENT in ECB mode
// and answers MSG_ID carrying ID and ENC(ID) (the second ECB block carries a
// copy of ID). Sending ID in the clear next to its encryption is this
// design's reading of "the reader compares its decryption with the
// identification data".
//
// Stage 2, mutual authentication: on MSG_REQ_AUTH the tag draws R_1 and sends
// it. On the reader's challenge MSG_CH (Ch_1, Ch_2) it computes
// (Tag_Ch_1, Tag_Ch_2) = ENC(Ch_1, Ch_2) and authenticates the reader when
// Tag_Ch_1 equals R_1 (r_a goes high). It then draws R_3 and sends
// (RS_1, RS_2) = ENC(R_3, Tag_Ch_1) as MSG_RS. A failed check sends
// MSG_REJECT instead (this design's own addition, so the reader can finish).
//
// Random numbers come from the tag's own rng64 unless rn_ext is high, in
// which case R_1 and R_3 are taken from rn1_ext and rn3_ext. Messages are
// one-clock pulses (rx_valid/tx_valid). r_a is cleared by every new request.
// Each ECB encryption takes ROUNDS+1 clocks (33).
module rfid_tag
  import present_pkg::*;
  import rfid_pkg::*;
#(
  parameter int unsigned KEY_W  = 128,
  parameter int unsigned ROUNDS = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] key,
  // random source
  input  logic             seed_ld,
  input  logic [63:0]      seed,
  input  logic             rn_ext,
  input  logic [63:0]      rn1_ext,
  input  logic [63:0]      rn3_ext,
  // link from / to the reader
  input  logic             rx_valid,
  input  rfid_msg_t        rx_msg,
  output logic             tx_valid,
  output rfid_msg_t        tx_msg,
  // results
  output logic             r_a,       // reader authenticated
  output logic             r_a_fail,  // reader rejected
  output block_t           r1,
  output block_t           r3,
  output block_t           tag_ch1,
  output block_t           tag_ch2,
  output block_t           rs1,
  output block_t           rs2
);

  typedef enum logic [2:0] {
    T_IDLE,      // waiting for a request
    T_ID_ENC,    // encrypting the identification word
    T_WAIT_CH,   // R_1 sent, waiting for the challenge
    T_CH_ENC,    // encrypting Ch_1, Ch_2
    T_RS_ENC     // encrypting R_3, Tag_Ch_1
  } tag_state_e;

  tag_state_e state_q;
  block_t     id_q;
  logic       rng_next;
  block_t     rnd;
  logic       ecb_start, ecb_busy, ecb_done;
  block_t     ecb_in1, ecb_in2, ecb_out1, ecb_out2;
  logic       rx_req_id, rx_req_auth, rx_ch;
  logic       reader_ok;

  assign rx_req_id   = rx_valid && rx_msg.kind == MSG_REQ_ID;
  assign rx_req_auth = rx_valid && rx_msg.kind == MSG_REQ_AUTH;
  assign rx_ch       = rx_valid && rx_msg.kind == MSG_CH;

  // Reader check: Tag_Ch_1 = ENC(Ch_1) must give back R_1.
  assign reader_ok   = (ecb_out1 == r1);

  rng64 u_rng (
    .clk, .rst_n, .seed_ld, .seed, .next(rng_next), .rnd
  );

  present_ecb #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_ecb (
    .clk, .rst_n, .start(ecb_start), .decrypt(1'b0), .key,
    .din1(ecb_in1), .din2(ecb_in2), .dout1(ecb_out1), .dout2(ecb_out2),
    .busy(ecb_busy), .done(ecb_done)
  );

  // Start the ECB unit and pick its inputs from the current step.
  always_comb begin
    ecb_start = 1'b0;
    ecb_in1   = rx_msg.w1;
    ecb_in2   = rx_msg.w2;
    rng_next  = 1'b0;
    unique case (state_q)
      T_IDLE: begin
        if (rx_req_id) begin
          ecb_start = 1'b1;
          ecb_in1   = rnd;
          ecb_in2   = rnd;
          rng_next  = 1'b1;
        end else if (rx_req_auth) begin
          rng_next = !rn_ext;
        end
      end
      T_WAIT_CH: ecb_start = rx_ch;
      T_CH_ENC: if (ecb_done && reader_ok) begin
        ecb_start = 1'b1;
        ecb_in1   = rn_ext ? rn3_ext : rnd;
        ecb_in2   = ecb_out1;
        rng_next  = !rn_ext;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= T_IDLE;
      id_q     <= '0;
      tx_valid <= 1'b0;
      tx_msg   <= '{kind: MSG_REJECT, w1: '0, w2: '0};
      r_a      <= 1'b0;
      r_a_fail <= 1'b0;
      r1       <= '0;
      r3       <= '0;
      tag_ch1  <= '0;
      tag_ch2  <= '0;
      rs1      <= '0;
      rs2      <= '0;
    end else begin
      tx_valid <= 1'b0;
      unique case (state_q)
        T_IDLE: begin
          if (rx_req_id) begin
            id_q     <= rnd;
            r_a      <= 1'b0;
            r_a_fail <= 1'b0;
            state_q  <= T_ID_ENC;
          end else if (rx_req_auth) begin
            r1       <= rn_ext ? rn1_ext : rnd;
            r_a      <= 1'b0;
            r_a_fail <= 1'b0;
            tx_valid <= 1'b1;
            tx_msg   <= '{kind: MSG_R1, w1: (rn_ext ? rn1_ext : rnd), w2: '0};
            state_q  <= T_WAIT_CH;
          end
        end
        T_ID_ENC: if (ecb_done) begin
          tx_valid <= 1'b1;
          tx_msg   <= '{kind: MSG_ID, w1: id_q, w2: ecb_out1};
          state_q  <= T_IDLE;
        end
        T_WAIT_CH: begin
          if (rx_ch) state_q <= T_CH_ENC;
          else if (rx_req_id || rx_req_auth) state_q <= T_IDLE;
        end
        T_CH_ENC: if (ecb_done) begin
          tag_ch1 <= ecb_out1;
          tag_ch2 <= ecb_out2;
          if (reader_ok) begin
            r_a     <= 1'b1;
            r3      <= ecb_in1;
            state_q <= T_RS_ENC;
          end else begin
            r_a_fail <= 1'b1;
            tx_valid <= 1'b1;
            tx_msg   <= '{kind: MSG_REJECT, w1: '0, w2: '0};
            state_q  <= T_IDLE;
          end
        end
        T_RS_ENC: if (ecb_done) begin
          rs1      <= ecb_out1;
          rs2      <= ecb_out2;
          tx_valid <= 1'b1;
          tx_msg   <= '{kind: MSG_RS, w1: ecb_out1, w2: ecb_out2};
          state_q  <= T_IDLE;
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

  // The ECB unit is only started when it is idle.
  a_ecb_idle: assert property (@(posedge clk) disable iff (!rst_n)
    ecb_start |-> !ecb_busy);

endmodule
