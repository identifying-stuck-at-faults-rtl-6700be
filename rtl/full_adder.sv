// full_adder: the fault-free ("normal") circuit of the tester.
//
// Adds three bits and gives sum and carry-out. It is written as the same
// two-half-adder gate netlist as the faulty copies (see fa_pkg), so that
// the expected outputs and the tested outputs come from identical logic
// apart from the injected fault. Purely combinational; no clock.
//
// Ports: a, b, cin in; sum, cout out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p, g, t;

  always_comb begin
    p    = a ^ b;
    g    = a & b;
    t    = p & cin;
    sum  = p ^ cin;
    cout = g | t;
  end

endmodule
