// tb_fa_faulty: checks the fault-injecting full adder for all sixteen
// single stuck-at faults (eight sites, stuck-at-0 and stuck-at-1) over all
// eight input vectors against a hand-written reference, and checks that
// the default fault (a & b stuck-at-0) gives the tsum/tcarry cells of the
// reference truth table.
module tb_fa_faulty;
  import fa_pkg::*;
  import tb_fa_ref_pkg::*;

  localparam int unsigned NF = 2 * FA_NUM_SITES;

  logic a, b, cin;
  logic [NF-1:0] sum_o, cout_o;
  logic def_sum, def_cout;
  int checks = 0, failures = 0;

  // Fault k: site k/2, stuck at k%2 (matches the packing of fa_fault_t).
  for (genvar k = 0; k < NF; k++) begin : g_dut
    fa_faulty #(.FAULT(fa_fault_t'(FA_FAULT_W'(k)))) dut (
      .a(a), .b(b), .cin(cin), .sum(sum_o[k]), .cout(cout_o[k])
    );
  end

  fa_faulty dut_default (.a(a), .b(b), .cin(cin), .sum(def_sum), .cout(def_cout));

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    fa_fault_t f;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      for (int k = 0; k < int'(NF); k++) begin
        f   = fa_fault_t'(FA_FAULT_W'(k));
        exp = faulty_fa(f, a, b, cin);
        checks++;
        if ({cout_o[k], sum_o[k]} !== exp) begin
          failures++;
          $display("FAIL fault site=%s stuck=%0b abc=%03b got %02b exp %02b",
                   f.site.name(), f.stuck, v[2:0], {cout_o[k], sum_o[k]}, exp);
        end
      end
    end
    // Reference truth table, generator bits [2:0] = {a, b, cin}.
    for (int r = 0; r < int'(TT_ROWS); r++) begin
      {a, b, cin} = TT[r].lcg[2:0];
      #1;
      checks++;
      if (def_sum !== TT[r].tsum || def_cout !== TT[r].tcarry) begin
        failures++;
        $display("FAIL table row %0d: got tsum=%0b tcarry=%0b", r, def_sum, def_cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
