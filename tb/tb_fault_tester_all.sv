// tb_fault_tester_all: parallel fault simulation of every single stuck-at
// fault of the full adder.
//
// The tester is built with sixteen faulty copies, one per fault (eight
// lines, stuck-at-0 and stuck-at-1), all fed the same generator vector
// each cycle. The testbench predicts, from its own generator recurrence
// and its hand-written fault reference, the cycle in which each fault is
// first exposed, and checks every copy's tsum/tcarry, mismatch, fault flag
// and found_at against it. Because one generator period (16 vectors)
// covers all eight adder input combinations, every fault must be found
// within 16 vectors; the number of vectors needed to find all of them is
// printed.
module tb_fault_tester_all;
  import fa_pkg::*;
  import tb_fa_ref_pkg::*;

  localparam int unsigned NF = 2 * FA_NUM_SITES;

  // Fault k: site k/2, stuck at k%2.
  function automatic logic [NF*FA_FAULT_W-1:0] all_faults();
    logic [NF*FA_FAULT_W-1:0] v;
    for (int k = 0; k < int'(NF); k++) v[k*FA_FAULT_W +: FA_FAULT_W] = FA_FAULT_W'(k);
    return v;
  endfunction

  logic clk = 1'b0;
  logic rst;
  logic [3:0] lcg_out;
  logic esum, ecarry;
  logic [NF-1:0] tsum, tcarry, mismatch, fault;
  logic [NF-1:0][7:0] found_at;
  logic [7:0] vec_count;
  int checks = 0, failures = 0;

  fault_tester #(.NUM_FAULTS(NF), .FAULTS(all_faults())) dut (
    .clk(clk), .rst(rst), .lcg_out(lcg_out), .esum(esum), .ecarry(ecarry),
    .tsum(tsum), .tcarry(tcarry), .mismatch(mismatch), .fault(fault),
    .found_at(found_at), .vec_count(vec_count)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
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

  initial begin
    int x, found [NF], last;
    logic [1:0] g, t;
    fa_fault_t f;
    bit mm;
    foreach (found[k]) found[k] = 0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    #1;
    x = (5 * 7 + 1) % 16;
    for (int i = 0; i < 20; i++) begin
      check("lcg_out", int'(lcg_out), x);
      g = good_fa(lcg_out[2], lcg_out[1], lcg_out[0]);
      for (int k = 0; k < int'(NF); k++) begin
        f  = fa_fault_t'(FA_FAULT_W'(k));
        t  = faulty_fa(f, lcg_out[2], lcg_out[1], lcg_out[0]);
        mm = (g != t);
        check($sformatf("copy %0d tsum", k), int'(tsum[k]), int'(t[0]));
        check($sformatf("copy %0d tcarry", k), int'(tcarry[k]), int'(t[1]));
        check($sformatf("copy %0d mismatch", k), int'(mismatch[k]), int'(mm));
        check($sformatf("copy %0d fault", k), int'(fault[k]), int'(found[k] != 0 || mm));
        check($sformatf("copy %0d found_at", k), int'(found_at[k]), found[k]);
        if (mm && found[k] == 0) found[k] = i + 1;
      end
      @(posedge clk);
      #1;
      x = (5 * x + 1) % 16;
    end
    last = 0;
    for (int k = 0; k < int'(NF); k++) begin
      f = fa_fault_t'(FA_FAULT_W'(k));
      check($sformatf("fault %s/SA%0d found within one period", f.site.name(), f.stuck),
            int'(found[k] >= 1 && found[k] <= 16), 1);
      check($sformatf("fault %s/SA%0d found_at", f.site.name(), f.stuck), int'(found_at[k]), found[k]);
      if (found[k] > last) last = found[k];
      $display("fault %-9s SA%0d found after %0d vectors", f.site.name(), f.stuck, found[k]);
    end
    check("all faults flagged", int'(&fault), 1);
    $display("all %0d faults found after %0d vectors", NF, last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
