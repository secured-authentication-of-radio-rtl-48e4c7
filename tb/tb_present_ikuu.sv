// tb_present_ikuu: checks the key updation unit for 80-, 128- and 256-bit keys
// against the reference key schedule, with random keys and all counter
// values, and checks known round keys: the standard PRESENT-80 key schedule
// of the all-zero key must give the round keys that yield the published
// test vector (checked through the reference encryption), and a zero key with
// counter 1 gives a single known pattern.
module tb_present_ikuu;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [79:0]  k80,  o80;
  logic [127:0] k128, o128;
  logic [255:0] k256, o256;
  logic [4:0]   rc;

  present_ikuu #(.KEY_W(80))  dut80  (.key_in(k80),  .rc, .key_out(o80));
  present_ikuu #(.KEY_W(128)) dut128 (.key_in(k128), .rc, .key_out(o128));
  present_ikuu #(.KEY_W(256)) dut256 (.key_in(k256), .rc, .key_out(o256));

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // Inverse of the zero-key step: {C..., counter} goes back to zero.
    k80 = {4'hC, 76'b0} | (80'd1 << 15);
    k128 = {8'hCC, 120'b0} | (128'd1 << 62);
    k256 = {8'hCC, 248'b0} | (256'd1 << 124);
    rc = 5'd1;
    @(posedge clk);
    check("zero80",  256'(o80),  '0);
    check("zero128", 256'(o128), '0);
    check("zero256", o256,       '0);
    repeat (50) begin
      k80  = {$urandom, $urandom, $urandom};
      k128 = {$urandom, $urandom, $urandom, $urandom};
      k256 = {8{$urandom}};
      rc   = 5'($urandom);
      k80  = 80'(kstep(256'(k80), 80, rc, 5));
      k128 = 128'(kstep(256'(k128), 128, rc, 5));
      k256 = kstep(k256, 256, rc, 5);
      @(posedge clk);
      check("undo80",  256'(o80),  256'(80'(kstep_inv(256'(k80), 80, rc, 5))));
      check("undo128", 256'(o128), 256'(128'(kstep_inv(256'(k128), 128, rc, 5))));
      check("undo256", o256,       kstep_inv(k256, 256, rc, 5));
    end
    repeat (200) begin
      k80  = {$urandom, $urandom, $urandom};
      k128 = {$urandom, $urandom, $urandom, $urandom};
      k256 = {8{$urandom}};
      rc   = 5'($urandom);
      @(posedge clk);
      check("kuu80",  256'(o80),  kstep_inv(256'(k80), 80, rc, 5));
      check("kuu128", 256'(o128), kstep_inv(256'(k128), 128, rc, 5));
      check("kuu256", o256,       kstep_inv(k256, 256, rc, 5));
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
