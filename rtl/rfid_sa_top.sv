// rfid_sa_top: secured authentication of an RFID tag and reader with the
// PRESENT block cipher in ECB mode (PRESENT-128 by default, KEY_W = 80 or
// 256 selects the other key sizes).
//
// The tag (rfid_tag) and the reader (rfid_reader) share the key input and
// talk over a direct one-clock message link. A start pulse makes the reader
// run both stages: tag recognition (ENC/DEC of a random identification
// word), then the mutual authentication of R_1, R_2 and R_3. r_a reports that
// the tag authenticated the reader, t_a that the reader authenticated the
// tag, tag_ok that stage 1 recognised the tag; done rises at the end of the
// session. Each side owns an rng64; with rn_ext high the three protocol
// random numbers are taken from rn1, rn2 and rn3 instead, which is how a
// fixed test session is reproduced. seed_ld loads seed_tag / seed_reader
// into the two generators.
//
// The intermediate values are brought out under the names of the protocol:
// reader_cha1/2 = Ch_1,2, tag_cha1/2 = Tag_Ch_1,2, tag_resp1/2 = RS_1,2 and
// reader_resp1/2 = RR_1,2; tag_r1, tag_r3 and reader_r2 are the random
// numbers R_1, R_3 and R_2 the session used.
//
// Timing at ROUNDS = 32: a complete session (both stages) takes 33 + 65 +
// 65 + 33 + 33 + 65 clock cycles of cipher work plus one link cycle per
// message and a few control cycles, about 310 cycles from start to done.
module rfid_sa_top
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
  input  logic             seed_ld,
  input  logic [63:0]      seed_tag,
  input  logic [63:0]      seed_reader,
  input  logic             rn_ext,
  input  logic [63:0]      rn1,
  input  logic [63:0]      rn2,
  input  logic [63:0]      rn3,
  output logic             done,
  output logic             tag_ok,
  output logic             r_a,
  output logic             r_a_fail,
  output logic             t_a,
  output logic [63:0]      reader_cha1,
  output logic [63:0]      reader_cha2,
  output logic [63:0]      tag_cha1,
  output logic [63:0]      tag_cha2,
  output logic [63:0]      tag_resp1,
  output logic [63:0]      tag_resp2,
  output logic [63:0]      reader_resp1,
  output logic [63:0]      reader_resp2,
  output logic [63:0]      tag_r1,
  output logic [63:0]      tag_r3,
  output logic [63:0]      reader_r2
);

  logic      r2t_valid, t2r_valid;
  rfid_msg_t r2t_msg, t2r_msg;

  rfid_tag #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_tag (
    .clk, .rst_n, .key,
    .seed_ld, .seed(seed_tag), .rn_ext, .rn1_ext(rn1), .rn3_ext(rn3),
    .rx_valid(r2t_valid), .rx_msg(r2t_msg),
    .tx_valid(t2r_valid), .tx_msg(t2r_msg),
    .r_a, .r_a_fail, .r1(tag_r1), .r3(tag_r3),
    .tag_ch1(tag_cha1), .tag_ch2(tag_cha2),
    .rs1(tag_resp1), .rs2(tag_resp2)
  );

  rfid_reader #(.KEY_W(KEY_W), .ROUNDS(ROUNDS)) u_reader (
    .clk, .rst_n, .start, .key,
    .seed_ld, .seed(seed_reader), .rn_ext, .rn2_ext(rn2),
    .rx_valid(t2r_valid), .rx_msg(t2r_msg),
    .tx_valid(r2t_valid), .tx_msg(r2t_msg),
    .done, .tag_ok, .t_a, .r2(reader_r2),
    .ch1(reader_cha1), .ch2(reader_cha2),
    .rr1(reader_resp1), .rr2(reader_resp2)
  );

endmodule
