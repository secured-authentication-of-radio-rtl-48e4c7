// tb_rfid_sa_top_k256: end-to-end test of the secured authentication system
// built for PRESENT-256 (KEY_W = 256, 32 rounds).
//
// Sessions use the built-in random generators and external random numbers
// with R_3 = R_2 and R_3 != R_2. Every intermediate value (challenges, tag
// challenges, tag responses, reader responses) is checked against the
// reference cipher for this key size; the reader must always be
// authenticated and the tag exactly when R_3 = R_2. A session must take the
// same number of clocks as with the other key sizes. The mechanisms
// exercised are counted and one that never occurs counts as a failure.
module tb_rfid_sa_top_k256;
  import present_ref_pkg::*;

  // Three ECB encryptions (33 clocks each: ID, Tag_Ch, RS), three ECB
  // decryptions (65 each: ID check, challenge, response) and one clock for
  // each of the six link messages and for the final verdict.
  localparam int SESSION_CYCLES = 3 * 33 + 3 * 65 + 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic [255:0] key;
  logic         start = 0, seed_ld = 0, rn_ext = 0;
  logic [63:0]  seed_tag = '0, seed_reader = '0, rn1 = '0, rn2 = '0, rn3 = '0;
  logic         done, tag_ok, r_a, r_a_fail, t_a;
  logic [63:0]  reader_cha1, reader_cha2, tag_cha1, tag_cha2;
  logic [63:0]  tag_resp1, tag_resp2, reader_resp1, reader_resp2;
  logic [63:0]  tag_r1, tag_r3, reader_r2;

  rfid_sa_top #(.KEY_W(256)) dut (.*);

  // mechanism counters
  int n_recognised = 0, n_reader_auth = 0, n_tag_auth = 0, n_tag_not_auth = 0;
  int n_ecb_enc = 0, n_ecb_dec = 0, n_ext = 0, n_int = 0;

  always @(posedge clk) begin
    if (rst_n && dut.u_tag.u_ecb.done)    n_ecb_enc++;
    if (rst_n && dut.u_reader.u_ecb.done) n_ecb_dec++;
  end

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic session(input bit ext, input logic [63:0] a, b, c);
    int cyc = 0;
    logic [63:0] r1, r2, r3;
    rn_ext = ext; rn1 = a; rn2 = b; rn3 = c;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check("session cycles", 64'(cyc), 64'(SESSION_CYCLES));
    r1 = tag_r1; r2 = reader_r2; r3 = tag_r3;
    if (ext) begin
      n_ext++;
      check("R_1", r1, a);
      check("R_2", r2, b);
      check("R_3", r3, c);
    end else n_int++;
    check("tag_ok", 64'(tag_ok), 64'd1);
    check("Ch_1", reader_cha1, decrypt(r1, 256'(key), 256));
    check("Ch_2", reader_cha2, decrypt(r2, 256'(key), 256));
    check("Tag_Ch_1", tag_cha1, r1);
    check("Tag_Ch_2", tag_cha2, r2);
    check("R_A", 64'(r_a), 64'd1);
    check("RS_1", tag_resp1, encrypt(r3, 256'(key), 256));
    check("RS_2", tag_resp2, encrypt(r1, 256'(key), 256));
    check("RR_1", reader_resp1, r3);
    check("RR_2", reader_resp2, r1);
    check("T_A", 64'(t_a), 64'(r3 == r2));
    if (tag_ok) n_recognised++;
    if (r_a) n_reader_auth++;
    if (t_a) n_tag_auth++; else n_tag_not_auth++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Built-in generators, seeded.
    @(negedge clk);
    seed_ld = 1'b1; seed_tag = {$urandom, $urandom}; seed_reader = {$urandom, $urandom};
    @(negedge clk);
    seed_ld = 1'b0;
    repeat (2) begin
      key = {8{$urandom}};
      session(1'b0, '0, '0, '0);
      begin
        automatic logic [63:0] x = {$urandom, $urandom}, y = {$urandom, $urandom};
        session(1'b1, {$urandom, $urandom}, x, x);
        session(1'b1, {$urandom, $urandom}, x, y);
      end
    end
    need("tag recognised", n_recognised);
    need("reader authenticated", n_reader_auth);
    need("tag authenticated", n_tag_auth);
    need("tag not authenticated", n_tag_not_auth);
    need("ECB encryption", n_ecb_enc);
    need("ECB decryption", n_ecb_dec);
    need("external random numbers", n_ext);
    need("internal random numbers", n_int);
    check("ECB enc runs", 64'(n_ecb_enc), 64'(3 * 6));
    check("ECB dec runs", 64'(n_ecb_dec), 64'(3 * 6));
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
