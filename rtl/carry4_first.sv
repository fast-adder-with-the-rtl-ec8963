// carry4_first: fast fourth carry of a 4-bit group that has a carry in.
//
// With X_i = A_i XNOR B_i, the carry out of a 4-bit ripple adder is A_i of
// the most significant bit that has X_i = 1 (a bit with A_i = B_i generates or
// kills the carry), and Cin only when all four X_i are 0. The circuit is four
// 2:1 multiplexers and one 3-input NOR:
//   m_hi  = X4 ? A4 : A3
//   sel   = X4 ? 1  : X3
//   m_mid = sel ? m_hi : A2          (A4, A3 or A2)
//   m_lo  = X1 ? A1 : Cin
//   cout  = NOR(X4,X3,X2) ? m_lo : m_mid
// so the longest path is three multiplexers. Bit 0 of each vector is bit 1 of
// the group. The structure is the document's. Purely combinational.
module carry4_first (
  input  logic [3:0] a,
  input  logic [3:0] x,
  input  logic       cin,
  output logic       cout
);

  logic m_hi, sel, m_mid, m_lo, none_hi;

  always_comb begin
    m_hi    = x[3] ? a[3] : a[2];
    sel     = x[3] ? 1'b1 : x[2];
    m_mid   = sel ? m_hi : a[1];
    m_lo    = x[0] ? a[0] : cin;
    none_hi = ~(x[3] | x[2] | x[1]);
    cout    = none_hi ? m_lo : m_mid;
  end

endmodule
