// tb_rfid_tag: drives the tag with a behavioural reader and checks every
// message it returns against the reference cipher (PRESENT-128).
//
// Stage 1: MSG_REQ_ID must be answered with (ID, ENC(ID)). Stage 2 with the
// tag's own random numbers: MSG_REQ_AUTH gives R_1; the challenge
// (DEC(R_1), DEC(R_2)) must authenticate the reader (r_a, Tag_Ch_1 = R_1,
// Tag_Ch_2 = R_2) and be answered with (ENC(R_3), ENC(Tag_Ch_1)). The same
// with external random numbers checks that R_1 and R_3 are taken from them.
// A wrong challenge must give MSG_REJECT and r_a_fail. The reply times are
// checked: one ECB encryption is 33 clocks, so the ID reply comes 33 clocks
// and RS 66 clocks after the cycle the request / challenge is on the link.
module tb_rfid_tag;
  import present_ref_pkg::*;
  import rfid_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic [127:0] key;
  logic         seed_ld = 0, rn_ext = 0;
  logic [63:0]  seed = '0, rn1 = '0, rn3 = '0;
  logic         rx_valid = 0, tx_valid;
  rfid_msg_t    rx_msg, tx_msg;
  logic         r_a, r_a_fail;
  logic [63:0]  r1, r3, tag_ch1, tag_ch2, rs1, rs2;

  rfid_tag dut (.clk, .rst_n, .key, .seed_ld, .seed, .rn_ext, .rn1_ext(rn1), .rn3_ext(rn3),
                .rx_valid, .rx_msg, .tx_valid, .tx_msg, .r_a, .r_a_fail, .r1, .r3,
                .tag_ch1, .tag_ch2, .rs1, .rs2);

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic send(input msg_kind_e kind, input logic [63:0] a, b);
    @(negedge clk);
    rx_valid = 1'b1;
    rx_msg = '{kind: kind, w1: a, w2: b};
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  // Wait for the tag's next message; returns it and the clocks waited.
  task automatic receive(output rfid_msg_t m, output int cyc);
    cyc = 0;
    while (!tx_valid) begin
      @(negedge clk);
      cyc++;
    end
    m = tx_msg;
    @(negedge clk);
  endtask

  task automatic session(input bit ext, input bit good_challenge);
    rfid_msg_t m;
    int cyc;
    logic [63:0] id, t1, r2;
    // stage 1
    send(MSG_REQ_ID, '0, '0);
    receive(m, cyc);
    check("ID kind", 64'(m.kind), 64'(MSG_ID));
    check("ID enc", m.w2, encrypt(m.w1, 256'(key), 128));
    check("ID time", 64'(cyc), 64'd33);
    id = m.w1;
    // stage 2
    rn_ext = ext;
    rn1 = {$urandom, $urandom};
    rn3 = {$urandom, $urandom};
    send(MSG_REQ_AUTH, '0, '0);
    receive(m, cyc);
    check("R1 kind", 64'(m.kind), 64'(MSG_R1));
    if (ext) check("R1 external", m.w1, rn1);
    else checks++;
    if (!ext && m.w1 == id) begin
      failures++;
      $display("FAIL R1 repeats ID");
    end
    t1 = m.w1;
    r2 = {$urandom, $urandom};
    if (good_challenge)
      send(MSG_CH, decrypt(t1, 256'(key), 128), decrypt(r2, 256'(key), 128));
    else
      send(MSG_CH, decrypt(t1 ^ 64'h1, 256'(key), 128), decrypt(r2, 256'(key), 128));
    receive(m, cyc);
    check("Tag_Ch_2", tag_ch2, r2);
    if (good_challenge) begin
      check("r_a", 64'(r_a), 64'd1);
      check("r_a_fail", 64'(r_a_fail), 64'd0);
      check("Tag_Ch_1", tag_ch1, t1);
      check("RS kind", 64'(m.kind), 64'(MSG_RS));
      if (ext) check("R3 external", r3, rn3);
      else checks++;
      check("RS_1", m.w1, encrypt(r3, 256'(key), 128));
      check("RS_2", m.w2, encrypt(t1, 256'(key), 128));
      check("RS regs", rs1 ^ rs2, m.w1 ^ m.w2);
      check("RS time", 64'(cyc), 64'd66);
    end else begin
      check("r_a", 64'(r_a), 64'd0);
      check("r_a_fail", 64'(r_a_fail), 64'd1);
      check("REJECT kind", 64'(m.kind), 64'(MSG_REJECT));
    end
  endtask

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom};
    rx_msg = '{kind: MSG_REQ_ID, w1: '0, w2: '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    seed_ld = 1'b1; seed = {$urandom, $urandom};
    @(negedge clk);
    seed_ld = 1'b0;
    session(1'b0, 1'b1);
    session(1'b1, 1'b1);
    session(1'b0, 1'b0);
    session(1'b1, 1'b0);
    key = {8{16'habcd}};
    session(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
