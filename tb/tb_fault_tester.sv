// tb_fault_tester: end-to-end test of the fault tester at its default
// parameters (4-bit generator, one copy with a & b stuck-at-0).
//
// After reset the tester runs 300 vectors, past the saturation of the
// vector counter. Every cycle the testbench checks the generator value
// against its own recurrence, the expected outputs against integer
// addition, the faulty copy against the hand-written fault reference, the
// fault flag against a sticky model and found_at. Every row of the
// reference truth table must be met with all of its cells equal. A second
// reset in mid-run must restart the sequence and clear the flag. Each
// mechanism (reseed, clean vector, first detection, flag held over a
// clean vector, generator wrap-around, counter saturation) is counted and
// must occur at least once.
module tb_fault_tester;
  import fa_pkg::*;
  import tb_fa_ref_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [3:0] lcg_out;
  logic esum, ecarry;
  logic [0:0] tsum, tcarry, mismatch, fault;
  logic [0:0][7:0] found_at;
  logic [7:0] vec_count;
  int checks = 0, failures = 0;

  int n_reseed = 0, n_clean = 0, n_detect = 0, n_hold = 0, n_wrap = 0, n_sat = 0;
  bit row_met [TT_ROWS];

  fault_tester dut (
    .clk(clk), .rst(rst), .lcg_out(lcg_out), .esum(esum), .ecarry(ecarry),
    .tsum(tsum), .tcarry(tcarry), .mismatch(mismatch), .fault(fault),
    .found_at(found_at), .vec_count(vec_count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Runs nvec vectors after a reset and checks every cycle.
  task automatic run(int nvec);
    int x, first_x, found;
    bit seen;
    logic [1:0] g, t;
    bit mm;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check("fault in reset", int'(fault[0]), 0);
    rst = 1'b0;
    n_reseed++;
    x = (5 * 7 + 1) % 16;
    first_x = x;
    seen = 0; found = 0;
    for (int i = 0; i < nvec; i++) begin
      #1;
      check("lcg_out", int'(lcg_out), x);
      check("vec_count", int'(vec_count), (i > 255) ? 255 : i);
      g  = good_fa(lcg_out[2], lcg_out[1], lcg_out[0]);
      t  = faulty_fa(FA_G_SA0, lcg_out[2], lcg_out[1], lcg_out[0]);
      mm = (g != t);
      check("esum", int'(esum), int'(g[0]));
      check("ecarry", int'(ecarry), int'(g[1]));
      check("tsum", int'(tsum[0]), int'(t[0]));
      check("tcarry", int'(tcarry[0]), int'(t[1]));
      check("mismatch", int'(mismatch[0]), int'(mm));
      check("fault", int'(fault[0]), int'(seen || mm));
      check("found_at", int'(found_at[0]), found);
      if (!mm) n_clean++;
      if (seen && !mm) n_hold++;
      if (i > 0 && x == first_x) n_wrap++;
      if (vec_count == 8'hFF) n_sat++;
      // Reference truth table rows, met once the first detection order is
      // fixed by the generator: compare every printed cell.
      for (int r = 0; r < int'(TT_ROWS); r++) begin
        if (i < 16 && lcg_out == TT[r].lcg) begin
          row_met[r] = 1'b1;
          check($sformatf("table row %0d", r),
                int'({esum, ecarry, tsum[0], tcarry[0], fault[0]}),
                int'({TT[r].esum, TT[r].ecarry, TT[r].tsum, TT[r].tcarry, TT[r].fault}));
        end
      end
      if (mm && !seen) begin
        seen = 1; found = i + 1; n_detect++;
      end
      @(posedge clk);
      x = (5 * x + 1) % 16;
    end
  endtask

  initial begin
    run(300);
    run(40);   // second reset in mid-run: sequence and flag restart
    for (int r = 0; r < int'(TT_ROWS); r++) check($sformatf("table row %0d met", r), int'(row_met[r]), 1);
    check("reseed happened", int'(n_reseed >= 2), 1);
    check("clean vector happened", int'(n_clean > 0), 1);
    check("detection happened", int'(n_detect > 0), 1);
    check("sticky hold happened", int'(n_hold > 0), 1);
    check("generator wrap happened", int'(n_wrap > 0), 1);
    check("counter saturation happened", int'(n_sat > 0), 1);
    $display("reseed=%0d clean=%0d detect=%0d hold=%0d wrap=%0d saturate=%0d",
             n_reseed, n_clean, n_detect, n_hold, n_wrap, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
