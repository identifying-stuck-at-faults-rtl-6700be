// comparator: flags a stuck-at fault when a faulty copy's outputs differ
// from the fault-free outputs.
//
// mismatch is combinational: expected and tested sum/carry compared bit by
// bit. fault is the OR of the present mismatch and a sticky bit that
// remembers any earlier mismatch since reset, so once a vector has exposed
// the fault the flag stays high while later vectors that happen to agree
// are applied; this matches the reference truth table, where the fault
// column stays at 1 after the first differing vector. The comparator also
// records the 1-based index (vec_idx + 1) of the first vector that exposed
// the fault, i.e. how many test vectors were needed to find it; 0 means
// not yet found. Recording that index is this design's addition.
//
// Timing: rst is synchronous and clears the sticky bit and the index;
// while rst is high nothing is compared. vec_idx is the number of vectors
// applied before the present one.
module comparator #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             esum,     // expected (fault-free) sum
  input  logic             ecarry,   // expected carry
  input  logic             tsum,     // sum of the circuit under test
  input  logic             tcarry,   // carry of the circuit under test
  input  logic [CNT_W-1:0] vec_idx,  // vectors applied before this one
  output logic             mismatch, // this vector differs
  output logic             fault,    // a vector since reset has differed
  output logic [CNT_W-1:0] found_at  // vectors needed to find it, 0 = none
);

  logic seen_q;

  always_comb begin
    mismatch = !rst && ((esum != tsum) || (ecarry != tcarry));
    fault    = seen_q || mismatch;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_q   <= 1'b0;
      found_at <= '0;
    end else if (mismatch && !seen_q) begin
      seen_q   <= 1'b1;
      found_at <= vec_idx + 1'b1;
    end
  end

endmodule
