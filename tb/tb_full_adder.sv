// tb_full_adder: exhaustive check of the fault-free full adder against
// integer addition, over all eight input combinations, twice.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {a, b, cin} = 3'(v);
        #1;
        checks++;
        if ({cout, sum} !== 2'(a + b + cin)) begin
          failures++;
          $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b sum=%0b", a, b, cin, cout, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
