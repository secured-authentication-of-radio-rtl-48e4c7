// tb_present_ecb: checks the two-block ECB unit with 80-, 128- and 256-bit
// keys.
//
// Both blocks are encrypted and decrypted with random keys and compared with
// the reference model; a decryption of the encryption must return the input
// pair. The authentication example's PRESENT-128 values are checked
// (1111222233334444 -> 2a1ff2cd185e70f6 and, decrypting, -> 0e5a1210ee54725e).
// done must be a one-clock pulse, ROUNDS+1 = 33 clocks after start for
// encryption and 2*ROUNDS+1 = 65 for decryption, and a start while busy must
// be ignored.
module tb_present_ecb;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic         start [3], dec [3], busy [3], done [3];
  logic [255:0] key [3];
  logic [63:0]  din1 [3], din2 [3], dout1 [3], dout2 [3];

  present_ecb #(.KEY_W(80)) d80 (.clk, .rst_n, .start(start[0]), .decrypt(dec[0]), .key(key[0][79:0]),
    .din1(din1[0]), .din2(din2[0]), .dout1(dout1[0]), .dout2(dout2[0]), .busy(busy[0]), .done(done[0]));
  present_ecb d128 (.clk, .rst_n, .start(start[1]), .decrypt(dec[1]), .key(key[1][127:0]),
    .din1(din1[1]), .din2(din2[1]), .dout1(dout1[1]), .dout2(dout2[1]), .busy(busy[1]), .done(done[1]));
  present_ecb #(.KEY_W(256)) d256 (.clk, .rst_n, .start(start[2]), .decrypt(dec[2]), .key(key[2]),
    .din1(din1[2]), .din2(din2[2]), .dout1(dout1[2]), .dout2(dout2[2]), .busy(busy[2]), .done(done[2]));

  localparam int unsigned KW [3] = '{80, 128, 256};

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // One operation on unit n; a second start two clocks in must be ignored.
  task automatic op(input int n, input bit d, input logic [255:0] k,
                    input logic [63:0] a, b, output logic [63:0] y1, y2);
    int cyc;
    @(negedge clk);
    start[n] = 1'b1; dec[n] = d; key[n] = k; din1[n] = a; din2[n] = b;
    @(posedge clk);
    cyc = 1;
    @(negedge clk);
    start[n] = 1'b0; din1[n] = ~a; din2[n] = ~b; key[n] = ~k; dec[n] = ~d;
    @(posedge clk);
    cyc++;
    @(negedge clk);
    start[n] = 1'b1;           // ignored: unit busy
    @(posedge clk);
    cyc++;
    @(negedge clk);
    start[n] = 1'b0;
    while (!done[n]) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    y1 = dout1[n];
    y2 = dout2[n];
    check($sformatf("latency key_w=%0d dec=%0d", KW[n], d), 256'(cyc), d ? 256'd65 : 256'd33);
    @(posedge clk);
    @(negedge clk);
    check("done pulse", 256'(done[n]), 256'd0);
    check("idle after op", 256'(busy[n]), 256'd0);
  endtask

  initial begin
    logic [63:0] y1, y2, z1, z2;
    logic [255:0] kabcd;
    for (int n = 0; n < 3; n++) begin
      start[n] = 0; dec[n] = 0; key[n] = '0; din1[n] = '0; din2[n] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    kabcd = {128'h0, {8{16'habcd}}};
    op(1, 1'b0, kabcd, 64'h1111222233334444, 64'h1111222233334444, y1, y2);
    check("fig enc 1", 256'(y1), 256'(64'h2a1ff2cd185e70f6));
    check("fig enc 2", 256'(y2), 256'(64'h2a1ff2cd185e70f6));
    op(1, 1'b1, kabcd, 64'h1111222233334444, 64'h2a1ff2cd185e70f6, y1, y2);
    check("fig dec 1", 256'(y1), 256'(64'h0e5a1210ee54725e));
    check("fig dec 2", 256'(y2), 256'(64'h1111222233334444));
    repeat (8) begin
      for (int n = 0; n < 3; n++) begin
        automatic logic [63:0]  a = {$urandom, $urandom}, b = {$urandom, $urandom};
        automatic logic [255:0] k = {8{$urandom}} & ((256'd1 << KW[n]) - 1);
        op(n, 1'b0, k, a, b, y1, y2);
        check("enc 1", 256'(y1), 256'(encrypt(a, k, KW[n])));
        check("enc 2", 256'(y2), 256'(encrypt(b, k, KW[n])));
        op(n, 1'b1, k, y1, y2, z1, z2);
        check("dec 1", 256'(z1), 256'(a));
        check("dec 2", 256'(z2), 256'(b));
        op(n, 1'b1, k, a, b, z1, z2);
        check("dec ref 1", 256'(z1), 256'(decrypt(a, k, KW[n])));
        check("dec ref 2", 256'(z2), 256'(decrypt(b, k, KW[n])));
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
