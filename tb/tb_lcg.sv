// tb_lcg: checks the linear congruential generator against the recurrence
// x' = (2^R1 + 1) * x + B1 mod 2^N, computed here with a multiply. Checks
// one new number per clock, the full period 2^N (every value exactly once
// per period), reseeding by start in the middle of a run, and a second,
// 8-bit configuration.
module tb_lcg;
  logic clk = 1'b0;
  logic start;
  logic [3:0] x4;
  logic [7:0] x8;
  int checks = 0, failures = 0;

  localparam int unsigned N8 = 8, R8 = 3;
  localparam logic [7:0] B8 = 8'h35, S8 = 8'hA5;

  lcg dut4 (.clk(clk), .start(start), .x(x4));
  lcg #(.N(N8), .R1(R8), .B1(B8), .X0(S8)) dut8 (.clk(clk), .start(start), .x(x8));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int next4(int x);
    return (5 * x + 1) % 16;
  endfunction
  function automatic int next8(int x);
    return (9 * x + int'(B8)) % 256;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int m4, m8;
    bit seen4 [16];
    bit seen8 [256];
    start = 1'b1;
    repeat (3) @(posedge clk);
    #1 start = 1'b0;
    m4 = next4(7);
    m8 = next8(int'(S8));
    check("first value after start (4-bit)", int'(x4), m4);
    check("first value after start (8-bit)", int'(x8), m8);
    // One full period of the 8-bit generator covers 16 periods of the 4-bit one.
    for (int i = 0; i < 256; i++) begin
      check("4-bit sequence", int'(x4), m4);
      check("8-bit sequence", int'(x8), m8);
      if (i < 16) begin
        checks++;
        if (seen4[x4]) begin failures++; $display("FAIL 4-bit value %0d repeats early", x4); end
        seen4[x4] = 1'b1;
      end
      checks++;
      if (seen8[x8]) begin failures++; $display("FAIL 8-bit value %0d repeats early", x8); end
      seen8[x8] = 1'b1;
      @(posedge clk);
      #1;
      m4 = next4(m4);
      m8 = next8(m8);
    end
    // Reseed in the middle of a run.
    repeat (5) @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    check("value after reseed (4-bit)", int'(x4), next4(7));
    check("value after reseed (8-bit)", int'(x8), next8(int'(S8)));
    @(posedge clk);
    #1;
    check("second value after reseed (4-bit)", int'(x4), next4(next4(7)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
