// tb_present_kuu: checks the key updation unit for 80-, 128- and 256-bit keys
// against the reference key step with random keys and counters, and checks
// the zero key with counter 1, whose result is worked out by hand: the
// rotation leaves zero, the S-box turns the top nibble(s) into C and the
// counter sets the lowest bit of the counter field.
module tb_present_kuu;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [79:0]  k80,  o80;
  logic [127:0] k128, o128;
  logic [255:0] k256, o256;
  logic [4:0]   rc;

  present_kuu #(.KEY_W(80))  dut80  (.key_in(k80),  .rc, .key_out(o80));
  present_kuu #(.KEY_W(128)) dut128 (.key_in(k128), .rc, .key_out(o128));
  present_kuu #(.KEY_W(256)) dut256 (.key_in(k256), .rc, .key_out(o256));

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // Zero key, counter 1: rotation leaves zero, S(0) = C on the top
    // nibble(s), counter bit 0 lands at the counter field's lowest bit.
    k80 = '0; k128 = '0; k256 = '0; rc = 5'd1;
    @(posedge clk);
    check("zero80",  256'(o80),  256'({4'hC, 76'b0} | (80'd1 << 15)));
    check("zero128", 256'(o128), 256'({8'hCC, 120'b0} | (128'd1 << 62)));
    check("zero256", 256'(o256), {8'hCC, 248'b0} | (256'd1 << 124));
    repeat (200) begin
      k80  = {$urandom, $urandom, $urandom};
      k128 = {$urandom, $urandom, $urandom, $urandom};
      k256 = {8{$urandom}};
      rc   = 5'($urandom);
      @(posedge clk);
      check("kuu80",  256'(o80),  kstep(256'(k80), 80, rc, 5));
      check("kuu128", 256'(o128), kstep(256'(k128), 128, rc, 5));
      check("kuu256", o256,       kstep(k256, 256, rc, 5));
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
