// tb_rfid_reader: drives the reader with a behavioural tag and checks its
// messages and verdicts against the reference cipher (PRESENT-128).
//
// Sessions: a good identification followed by a response built with
// R_3 = R_2 (the tag must be authenticated), the same with R_3 != R_2 (not
// authenticated, since RR_1 = R_3 is compared with R_2), a wrong
// identification word (the tag is not recognised and stage 2 never starts),
// and a MSG_REJECT from the tag. Internal and external R_2 are both used.
// The challenge must be (DEC(R_1), DEC(R_2)), RR_1,2 the decryption of
// RS_1,2, and the challenge must come 65 clocks (one ECB decryption) after
// R_1 is on the link.
module tb_rfid_reader;
  import present_ref_pkg::*;
  import rfid_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic [127:0] key;
  logic         start = 0, seed_ld = 0, rn_ext = 0;
  logic [63:0]  seed = '0, rn2 = '0;
  logic         rx_valid = 0, tx_valid;
  rfid_msg_t    rx_msg, tx_msg;
  logic         done, tag_ok, t_a;
  logic [63:0]  r2, ch1, ch2, rr1, rr2;

  rfid_reader dut (.clk, .rst_n, .start, .key, .seed_ld, .seed, .rn_ext, .rn2_ext(rn2),
                   .rx_valid, .rx_msg, .tx_valid, .tx_msg, .done, .tag_ok, .t_a,
                   .r2, .ch1, .ch2, .rr1, .rr2);

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

  task automatic receive(output rfid_msg_t m, output int cyc);
    cyc = 0;
    while (!tx_valid) begin
      @(negedge clk);
      cyc++;
    end
    m = tx_msg;
    @(negedge clk);
  endtask

  task automatic wait_done();
    while (!done) @(negedge clk);
  endtask

  // mode 0: RS with R_3 = R_2, 1: R_3 random, 2: bad ID, 3: tag rejects
  task automatic session(input int mode, input bit ext);
    rfid_msg_t m;
    int cyc;
    logic [63:0] id, r1, r3, rs1, rs2;
    rn_ext = ext;
    rn2 = {$urandom, $urandom};
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    receive(m, cyc);
    check("REQ_ID", 64'(m.kind), 64'(MSG_REQ_ID));
    id = {$urandom, $urandom};
    send(MSG_ID, id, encrypt(mode == 2 ? ~id : id, 256'(key), 128));
    if (mode == 2) begin
      wait_done();
      check("tag_ok bad id", 64'(tag_ok), 64'd0);
      check("t_a bad id", 64'(t_a), 64'd0);
      checks++;
      if (tx_valid) begin failures++; $display("FAIL message after bad id"); end
      return;
    end
    receive(m, cyc);
    check("REQ_AUTH", 64'(m.kind), 64'(MSG_REQ_AUTH));
    check("tag_ok", 64'(tag_ok), 64'd1);
    r1 = {$urandom, $urandom};
    send(MSG_R1, r1, '0);
    receive(m, cyc);
    check("CH kind", 64'(m.kind), 64'(MSG_CH));
    if (ext) check("R2 external", r2, rn2);
    else checks++;
    check("Ch_1", m.w1, decrypt(r1, 256'(key), 128));
    check("Ch_2", m.w2, decrypt(r2, 256'(key), 128));
    check("Ch regs", ch1 ^ ch2, m.w1 ^ m.w2);
    check("CH time", 64'(cyc), 64'd65);
    if (mode == 3) begin
      send(MSG_REJECT, '0, '0);
      wait_done();
      check("t_a reject", 64'(t_a), 64'd0);
      return;
    end
    r3  = (mode == 0) ? r2 : {$urandom, $urandom};
    rs1 = encrypt(r3, 256'(key), 128);
    rs2 = encrypt(r1, 256'(key), 128);
    send(MSG_RS, rs1, rs2);
    wait_done();
    check("RR_1", rr1, r3);
    check("RR_2", rr2, r1);
    check("t_a", 64'(t_a), (mode == 0) ? 64'd1 : 64'd0);
  endtask

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom};
    rx_msg = '{kind: MSG_ID, w1: '0, w2: '0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 4; mode++) begin
      session(mode, 1'b0);
      session(mode, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
