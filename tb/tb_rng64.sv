// tb_rng64: checks the 64-bit LFSR random number generator: reset value,
// seed loading (an all-zero seed falls back to the reset seed), holding while
// next is low, and 2000 steps against a bit-level model of the Galois
// register for x^64 + x^63 + x^61 + x^60 + 1 (feedback from bit 0 into bits
// 63, 62, 60 and 59 after the right shift). No value may repeat within the
// run and the register may never reach zero.
module tb_rng64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  int checks = 0, failures = 0;

  logic        seed_ld = 1'b0, next = 1'b0;
  logic [63:0] seed = '0, rnd, model;
  logic [63:0] seen [$];

  localparam logic [63:0] RST = 64'h1234_5678_9ABC_DEF1;

  rng64 #(.RESET_SEED(RST)) dut (.clk, .rst_n, .seed_ld, .seed, .next, .rnd);

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] step(input logic [63:0] s);
    logic [63:0] n;
    for (int i = 0; i < 63; i++) n[i] = s[i+1];
    n[63] = s[0];
    n[62] = n[62] ^ s[0];
    n[60] = n[60] ^ s[0];
    n[59] = n[59] ^ s[0];
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset value", rnd, RST);
    rst_n = 1'b1;
    @(negedge clk);
    seed_ld = 1'b1; seed = 64'h0;
    @(negedge clk);
    check("zero seed", rnd, RST);
    seed = 64'hFEDC_BA98_7654_3210;
    @(negedge clk);
    seed_ld = 1'b0;
    check("seed load", rnd, 64'hFEDC_BA98_7654_3210);
    repeat (3) @(negedge clk);
    check("hold", rnd, 64'hFEDC_BA98_7654_3210);
    model = rnd;
    next = 1'b1;
    repeat (2000) begin
      @(negedge clk);
      model = step(model);
      check("step", rnd, model);
      checks++;
      if (rnd == '0 || (rnd inside {seen})) begin
        failures++;
        $display("FAIL repeat or zero %h", rnd);
      end
      seen.push_back(rnd);
    end
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
