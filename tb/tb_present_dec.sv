// tb_present_dec: checks the PRESENT decryption core for 80-, 128- and
// 256-bit keys, a 16-round build of PRESENT-80 and a 64-round build of
// PRESENT-128.
//
// The core is loaded with a cipher text and the updated key (the reference
// key schedule's last key). Published PRESENT-80/128 vectors are decrypted
// back to their plain texts, the PRESENT-128 value of the authentication
// example is checked (key abcd...abcd: 1111222233334444 decrypts to
// 0e5a1210ee54725e), and random cipher texts are compared with the reference
// decryption. iuk must come back to the original key, and done must rise
// exactly ROUNDS clocks after the ld edge.
module tb_present_dec;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic         ld [5], done [5], busy [5];
  logic [63:0]  it [5], ct [5];
  logic [255:0] k  [5], uk [5], uk_in [5];
  logic [79:0]  uk80, uk80r;
  logic [127:0] uk128, uk128r;

  present_dec #(.KEY_W(80))  d80  (.clk, .rst_n, .ld(ld[0]), .kld(ld[0]), .ct(it[0]), .uk(uk_in[0][79:0]),
                                   .ot(ct[0]), .iuk(uk80), .busy(busy[0]), .done(done[0]));
  present_dec #(.KEY_W(128)) d128 (.clk, .rst_n, .ld(ld[1]), .kld(ld[1]), .ct(it[1]), .uk(uk_in[1][127:0]),
                                   .ot(ct[1]), .iuk(uk128), .busy(busy[1]), .done(done[1]));
  present_dec #(.KEY_W(256)) d256 (.clk, .rst_n, .ld(ld[2]), .kld(ld[2]), .ct(it[2]), .uk(uk_in[2]),
                                   .ot(ct[2]), .iuk(uk[2]), .busy(busy[2]), .done(done[2]));
  present_dec #(.KEY_W(80), .ROUNDS(16)) d80r16 (.clk, .rst_n, .ld(ld[3]), .kld(ld[3]), .ct(it[3]),
                                   .uk(uk_in[3][79:0]), .ot(ct[3]), .iuk(uk80r), .busy(busy[3]), .done(done[3]));
  assign uk[0] = 256'(uk80);
  assign uk[1] = 256'(uk128);
  assign uk[3] = 256'(uk80r);
  assign uk[4] = 256'(uk128r);
  present_dec #(.KEY_W(128), .ROUNDS(64)) d128r64 (.clk, .rst_n, .ld(ld[4]), .kld(ld[4]),
                                   .ct(it[4]), .uk(uk_in[4][127:0]), .ot(ct[4]), .iuk(uk128r), .busy(busy[4]), .done(done[4]));

  localparam int unsigned KW [5] = '{80, 128, 256, 80, 128};
  localparam int unsigned RN [5] = '{32, 32, 32, 16, 64};

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Decrypt on core n; count clocks from the ld edge to done.
  task automatic run(input int n, input logic [63:0] p, input logic [255:0] key,
                     output logic [63:0] c, output int cycles);
    @(negedge clk);
    it[n] = p; k[n] = key; uk_in[n] = final_key(key, KW[n], RN[n]); ld[n] = 1'b1;
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

  task automatic dec_check(input int n, input logic [63:0] p, input logic [255:0] key,
                           input logic [63:0] exp);
    logic [63:0] c;
    int cyc;
    run(n, p, key, c, cyc);
    check($sformatf("ot key_w=%0d", KW[n]), 256'(c), 256'(exp));
    check($sformatf("iuk key_w=%0d", KW[n]), uk[n], key);
    check($sformatf("latency key_w=%0d", KW[n]), 256'(cyc), 256'(RN[n]));
  endtask

  function automatic logic [255:0] rnd_key(input int unsigned w);
    logic [255:0] r = {8{$urandom}};
    return r & ((256'd1 << w) - 1);
  endfunction

  initial begin
    for (int n = 0; n < 5; n++) begin ld[n] = 0; it[n] = '0; k[n] = '0; uk_in[n] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Published test vectors, decrypted back.
    dec_check(0, 64'h5579c1387b228445, 256'h0, 64'h0);
    dec_check(0, 64'he72c46c0f5945049, 256'hffff_ffff_ffff_ffff_ffff, 64'h0);
    dec_check(0, 64'ha112ffc72f68417b, 256'h0, 64'hffff_ffff_ffff_ffff);
    dec_check(0, 64'h3333dcd3213210d2, 256'hffff_ffff_ffff_ffff_ffff, 64'hffff_ffff_ffff_ffff);
    dec_check(1, 64'h96db702a2e6900af, 256'h0, 64'h0);
    dec_check(1, 64'h1111222233334444, {128'h0, {8{16'habcd}}}, 64'h0e5a1210ee54725e);
    // Random cipher texts and keys against the reference model.
    repeat (20) begin
      for (int n = 0; n < 5; n++) begin
        automatic logic [63:0]  c = {$urandom, $urandom};
        automatic logic [255:0] key = rnd_key(KW[n]);
        dec_check(n, c, key, decrypt(c, key, KW[n], RN[n]));
      end
    end
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
