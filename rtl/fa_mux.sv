// fa_mux: multiplexer-based full adder, the cell of the plain fast adder.
//
// X = A XNOR B drives both outputs. The sum is X XNOR Cin (equal to
// A xor B xor Cin). The carry is a 2:1 multiplexer selected by X: when A and B
// are equal (X = 1) the carry is A, otherwise it propagates Cin. X is also an
// output, because the fast carry circuits reuse it. This is the gate-level
// full adder the fast adder is built from; nothing here is a local choice.
// Purely combinational; no clock.
module fa_mux (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic x
);

  always_comb begin
    x    = ~(a ^ b);
    s    = ~(x ^ cin);
    cout = x ? a : cin;
  end

endmodule
