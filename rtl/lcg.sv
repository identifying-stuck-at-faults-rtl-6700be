// lcg: linear congruential generator used as the test-pattern source.
//
// Computes x(i+1) = ((2^R1 + 1) * x(i) + B1) mod 2^N. The multiplication is
// a left shift by R1 bits, so the datapath is a 2:1 mux, a fixed shifter, a
// three-operand modulo-2^N adder and an N-bit register, as in the published
// LCG architecture. While start is high the mux feeds the seed X0 into the
// adder instead of the register's own value, so the first number after
// start falls is f(X0) and one new number follows every clock.
//
// With R1 >= 2 the multiplier minus one is divisible by 4 and, with B1 odd,
// the sequence has the full period 2^N; the parameters are checked below.
// N = 4 follows the 4-bit generator output of the reference design; R1 = 2,
// B1 = 1 and X0 = 7 are this design's choice (they reproduce the order of
// the reference truth table).
//
// Ports: clk, start (synchronous reseed), x (current number, registered).
module lcg #(
  parameter int unsigned N  = 4,
  parameter int unsigned R1 = 2,
  parameter logic [N-1:0] B1 = N'(1),
  parameter logic [N-1:0] X0 = N'(7)
) (
  input  logic         clk,
  input  logic         start,
  output logic [N-1:0] x
);

  logic [N-1:0] xi;       // mux output
  logic [N-1:0] shifted;  // 2^R1 * xi mod 2^N
  logic [N-1:0] next;     // adder output

  always_comb begin
    xi      = start ? X0 : x;
    shifted = xi << R1;
    next    = shifted + xi + B1;  // wraps modulo 2^N
  end

  always_ff @(posedge clk) begin
    x <= next;
  end

  // Full-period (Hull-Dobell) conditions for a modulus 2^N.
  initial begin
    assert (R1 >= 2 && R1 < N) else $error("lcg: R1 must be in [2, N-1] for full period");
    assert (B1[0] == 1'b1) else $error("lcg: B1 must be odd for full period");
  end

endmodule
