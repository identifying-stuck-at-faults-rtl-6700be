// fault_tester: on-chip stuck-at fault tester for a full adder.
//
// A linear congruential generator (lcg) produces one pseudo-random test
// vector per clock. Its low three bits drive a fault-free full adder (the
// expected outputs esum/ecarry) and NUM_FAULTS copies of the full adder,
// each with one single stuck-at fault (tsum/tcarry). Every copy has its
// own comparator: mismatch[k] shows that the present vector exposes the
// fault, and fault[k] rises with the first such vector and stays raised
// until reset. All copies see
// the same vector in the same cycle, so the faults are simulated in
// parallel. The generator runs freely and repeats its sequence every 2^N
// vectors, so testing loops over the vectors as long as rst is low.
//
// Vector mapping: a = lcg_out[2], b = lcg_out[1], cin = lcg_out[0];
// lcg_out[3] reaches only the output port. With the defaults (one copy,
// a & b stuck-at-0, generator 5*x + 1 mod 16 seeded with 7) the outputs
// reproduce the reference truth table. The bit mapping, the generator
// constants and the list of faults are choices of this design; the
// structure (generator, normal circuit, faulty circuits, comparators) and
// the 4-bit generator output follow the reference.
//
// Timing: rst is synchronous and active high. While it is high the
// generator is reseeded every clock and comparisons are off. The first
// vector appears in the cycle after rst falls; vec_count counts the
// vectors applied since then (saturating), and found_at[k] gives how many
// vectors were needed to expose fault k (0 = not exposed yet).
module fault_tester
  import fa_pkg::*;
#(
  parameter int unsigned N          = 4,
  parameter int unsigned R1         = 2,
  parameter logic [N-1:0] B1        = N'(1),
  parameter logic [N-1:0] X0        = N'(7),
  parameter int unsigned NUM_FAULTS = 1,
  parameter fa_fault_t [NUM_FAULTS-1:0] FAULTS = {NUM_FAULTS{FA_G_SA0}},
  parameter int unsigned CNT_W      = 8
) (
  input  logic                                  clk,
  input  logic                                  rst,
  output logic [N-1:0]                          lcg_out,
  output logic                                  esum,
  output logic                                  ecarry,
  output logic [NUM_FAULTS-1:0]                 tsum,
  output logic [NUM_FAULTS-1:0]                 tcarry,
  output logic [NUM_FAULTS-1:0]                 mismatch,
  output logic [NUM_FAULTS-1:0]                 fault,
  output logic [NUM_FAULTS-1:0][CNT_W-1:0]      found_at,
  output logic [CNT_W-1:0]                      vec_count
);

  // Test-pattern generator, reseeded while in reset.
  lcg #(.N(N), .R1(R1), .B1(B1), .X0(X0)) u_lcg (
    .clk   (clk),
    .start (rst),
    .x     (lcg_out)
  );

  logic a, b, cin;
  always_comb begin
    a   = lcg_out[2];
    b   = lcg_out[1];
    cin = lcg_out[0];
  end

  // Number of vectors applied since reset, saturating at all ones.
  always_ff @(posedge clk) begin
    if (rst)
      vec_count <= '0;
    else if (vec_count != '1)
      vec_count <= vec_count + 1'b1;
  end

  // Normal circuit: gives the expected outputs.
  full_adder u_golden (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (esum),
    .cout (ecarry)
  );

  // One faulty circuit and one comparator per fault.
  for (genvar k = 0; k < NUM_FAULTS; k++) begin : g_fault
    fa_faulty #(.FAULT(FAULTS[k])) u_dut (
      .a    (a),
      .b    (b),
      .cin  (cin),
      .sum  (tsum[k]),
      .cout (tcarry[k])
    );

    comparator #(.CNT_W(CNT_W)) u_cmp (
      .clk      (clk),
      .rst      (rst),
      .esum     (esum),
      .ecarry   (ecarry),
      .tsum     (tsum[k]),
      .tcarry   (tcarry[k]),
      .vec_idx  (vec_count),
      .mismatch (mismatch[k]),
      .fault    (fault[k]),
      .found_at (found_at[k])
    );
  end

  initial begin
    assert (N >= 3) else $error("fault_tester: N must be at least 3");
  end

endmodule
