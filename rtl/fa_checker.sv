// fa_checker: fault detector for one full adder.
//
// In a correct full adder S and Cout are equal only when A = B = Cin, and
// complementary otherwise. The checker builds the value S should have from
// Cout and compares it with S:
//   m1    = (A XNOR B)   ? Cout : ~Cout
//   m2    = (B XNOR Cin) ? m1   : ~Cout
//   err_n = S XNOR m2
// err_n = 1 means no fault was seen, err_n = 0 flags a fault (the document's
// Error polarity). A XNOR B comes in as xab so that the adder's carry path
// and the checker share that gate, as the document's self-testing full adder
// does. Purely combinational.
module fa_checker (
  input  logic s,
  input  logic cout,
  input  logic xab,
  input  logic b,
  input  logic cin,
  output logic err_n
);

  logic cout_n, xbc, m1, m2;

  always_comb begin
    cout_n = ~cout;
    xbc    = ~(b ^ cin);
    m1     = xab ? cout : cout_n;
    m2     = xbc ? m1 : cout_n;
    err_n  = ~(s ^ m2);
  end

endmodule
