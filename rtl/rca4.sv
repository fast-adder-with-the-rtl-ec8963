// rca4: 4-bit ripple-carry adder built from four multiplexer full adders.
//
// Bit 0 is the least significant bit (A1/B1). Each fa_mux passes its carry to
// the next; the per-bit X = A XNOR B values are brought out for the fast
// carry circuits of the fast adder, which does not use the ripple carry c4
// except as an observation point. Purely combinational.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic [3:0] x,
  output logic       c4
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    fa_mux u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1]),
      .x   (x[i])
    );
  end

  assign c4 = c[4];

endmodule
