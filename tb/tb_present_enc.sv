// tb_present_enc: checks the PRESENT encryption core for 80-, 128- and
// 256-bit keys, a 16-round build of PRESENT-80 and a 64-round build of
// PRESENT-128.
//
// Published PRESENT-80 and PRESENT-128 test vectors and the PRESENT-128
// value of the authentication example (key abcd...abcd, text
// 1111222233334444 -> 2a1ff2cd185e70f6) are checked, then random texts and
// keys against the reference model. The updated key output must equal the
// reference key schedule's last key, and done must rise exactly ROUNDS clocks
// after the ld edge (32 for the default build). Eight blocks streamed back
// to back must leave one every ROUNDS clocks.
module tb_present_enc;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic         ld [5], done [5], busy [5];
  logic [63:0]  it [5], ct [5];
  logic [255:0] k  [5], uk [5];
  logic [79:0]  uk80, uk80r;
  logic [127:0] uk128, uk128r;

  present_enc #(.KEY_W(80))  d80  (.clk, .rst_n, .ld(ld[0]), .kld(ld[0]), .it(it[0]), .k(k[0][79:0]),
                                   .ct(ct[0]), .uk(uk80), .busy(busy[0]), .done(done[0]));
  present_enc #(.KEY_W(128)) d128 (.clk, .rst_n, .ld(ld[1]), .kld(ld[1]), .it(it[1]), .k(k[1][127:0]),
                                   .ct(ct[1]), .uk(uk128), .busy(busy[1]), .done(done[1]));
  present_enc #(.KEY_W(256)) d256 (.clk, .rst_n, .ld(ld[2]), .kld(ld[2]), .it(it[2]), .k(k[2]),
                                   .ct(ct[2]), .uk(uk[2]), .busy(busy[2]), .done(done[2]));
  present_enc #(.KEY_W(80), .ROUNDS(16)) d80r16 (.clk, .rst_n, .ld(ld[3]), .kld(ld[3]), .it(it[3]),
                                   .k(k[3][79:0]), .ct(ct[3]), .uk(uk80r), .busy(busy[3]), .done(done[3]));
  assign uk[0] = 256'(uk80);
  assign uk[1] = 256'(uk128);
  assign uk[3] = 256'(uk80r);
  assign uk[4] = 256'(uk128r);
  present_enc #(.KEY_W(128), .ROUNDS(64)) d128r64 (.clk, .rst_n, .ld(ld[4]), .kld(ld[4]),
                                   .it(it[4]), .k(k[4][127:0]), .ct(ct[4]), .uk(uk128r), .busy(busy[4]), .done(done[4]));

  localparam int unsigned KW [5] = '{80, 128, 256, 80, 128};
  localparam int unsigned RN [5] = '{32, 32, 32, 16, 64};

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Encrypt on core n; count clocks from the ld edge to done.
  task automatic run(input int n, input logic [63:0] p, input logic [255:0] key,
                     output logic [63:0] c, output int cycles);
    @(negedge clk);
    it[n] = p; k[n] = key; ld[n] = 1'b1;
    @(posedge clk);
    cycles = 1;
    @(negedge clk);
    ld[n] = 1'b0;
    while (!done[n]) begin
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    c = ct[n];
  endtask

  task automatic enc_check(input int n, input logic [63:0] p, input logic [255:0] key,
                           input logic [63:0] exp);
    logic [63:0] c;
    int cyc;
    run(n, p, key, c, cyc);
    check($sformatf("ct key_w=%0d", KW[n]), 256'(c), 256'(exp));
    check($sformatf("uk key_w=%0d", KW[n]), uk[n], final_key(key, KW[n], RN[n]));
    check($sformatf("latency key_w=%0d", KW[n]), 256'(cyc), 256'(RN[n]));
  endtask

  // Back-to-back blocks: a new ld in the cycle done rises, so one block
  // leaves every ROUNDS clocks (64 bits per 32 clocks at the default).
  task automatic stream(input int n, input int nblk);
    logic [63:0]  p [$];
    logic [255:0] key;
    int cyc = 0, got = 0, sent = 0;
    key = rnd_key(KW[n]);
    for (int i = 0; i < nblk; i++) p.push_back({$urandom, $urandom});
    @(negedge clk);
    it[n] = p[0]; k[n] = key; ld[n] = 1'b1;
    sent = 1;
    while (got < nblk) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
      ld[n] = 1'b0;
      if (done[n]) begin
        check($sformatf("stream ct key_w=%0d", KW[n]), 256'(ct[n]), 256'(encrypt(p[got], key, KW[n], RN[n])));
        got++;
        if (sent < nblk) begin
          it[n] = p[sent]; ld[n] = 1'b1;
          sent++;
        end
      end
    end
    check($sformatf("stream cycles key_w=%0d", KW[n]), 256'(cyc), 256'(nblk * RN[n]));
  endtask

  function automatic logic [255:0] rnd_key(input int unsigned w);
    logic [255:0] r = {8{$urandom}};
    return r & ((256'd1 << w) - 1);
  endfunction

  initial begin
    for (int n = 0; n < 5; n++) begin ld[n] = 0; it[n] = '0; k[n] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Published test vectors.
    enc_check(0, 64'h0, 256'h0, 64'h5579c1387b228445);
    enc_check(0, 64'h0, 256'hffff_ffff_ffff_ffff_ffff, 64'he72c46c0f5945049);
    enc_check(0, 64'hffff_ffff_ffff_ffff, 256'h0, 64'ha112ffc72f68417b);
    enc_check(0, 64'hffff_ffff_ffff_ffff, 256'hffff_ffff_ffff_ffff_ffff, 64'h3333dcd3213210d2);
    enc_check(1, 64'h0, 256'h0, 64'h96db702a2e6900af);
    enc_check(1, 64'h1111222233334444, {128'h0, {8{16'habcd}}}, 64'h2a1ff2cd185e70f6);
    // Random texts and keys against the reference model.
    repeat (20) begin
      for (int n = 0; n < 5; n++) begin
        automatic logic [63:0]  p = {$urandom, $urandom};
        automatic logic [255:0] key = rnd_key(KW[n]);
        enc_check(n, p, key, encrypt(p, key, KW[n], RN[n]));
      end
    end
    // Throughput: 8 blocks back to back on each default-round core.
    for (int n = 0; n < 3; n++) stream(n, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
