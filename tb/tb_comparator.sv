// tb_comparator: drives random expected/tested outputs into the
// comparator and checks the combinational mismatch, the sticky fault flag
// and the recorded index of the first mismatching vector against a model
// kept in the testbench. Resets several times so that every run starts
// clean, and also checks that nothing is flagged while in reset.
module tb_comparator;
  localparam int unsigned CW = 8;

  logic clk = 1'b0;
  logic rst, esum, ecarry, tsum, tcarry;
  logic [CW-1:0] vec_idx;
  logic mismatch, fault;
  logic [CW-1:0] found_at;
  int checks = 0, failures = 0;
  int detections = 0, holds = 0;

  comparator #(.CNT_W(CW)) dut (
    .clk(clk), .rst(rst), .esum(esum), .ecarry(ecarry), .tsum(tsum),
    .tcarry(tcarry), .vec_idx(vec_idx), .mismatch(mismatch), .fault(fault),
    .found_at(found_at)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    bit m_seen;
    int m_found;
    bit exp_mm;
    int idx;
    for (int run = 0; run < 8; run++) begin
      // Reset, with differing inputs: nothing may be flagged.
      rst = 1'b1; esum = 1'b1; tsum = 1'b0; ecarry = 1'b0; tcarry = 1'b0; vec_idx = '0;
      @(posedge clk);
      #1;
      check("mismatch in reset", int'(mismatch), 0);
      check("fault in reset", int'(fault), 0);
      check("found_at in reset", int'(found_at), 0);
      rst = 1'b0;
      m_seen = 0; m_found = 0; idx = 0;
      for (int i = 0; i < 40; i++) begin
        esum = 1'($urandom); ecarry = 1'($urandom);
        // Mismatch rarely, so runs see clean vectors before the first one.
        tsum   = ($urandom % 8 == 0) ? ~esum : esum;
        tcarry = ($urandom % 8 == 0) ? ~ecarry : ecarry;
        vec_idx = CW'(idx);
        #1;
        exp_mm = (esum != tsum) || (ecarry != tcarry);
        check("mismatch", int'(mismatch), int'(exp_mm));
        check("fault", int'(fault), int'(m_seen || exp_mm));
        check("found_at before edge", int'(found_at), m_found);
        if (m_seen && !exp_mm) holds++;
        if (exp_mm && !m_seen) begin
          m_seen = 1; m_found = idx + 1; detections++;
        end
        @(posedge clk);
        #1;
        check("found_at after edge", int'(found_at), m_found);
        idx++;
      end
    end
    check("detections happened", int'(detections > 0), 1);
    check("sticky holds happened", int'(holds > 0), 1);
    $display("detections=%0d sticky_holds=%0d", detections, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
