// carry4_second: carry of the upper 4-bit group of an 8-bit pair, computed
// without a carry in.
//
// It gives A_i of the most significant bit of the group with X_i = 1, using
// the same multiplexer tree as carry4_first, but where carry4_first would fall
// back to Cin this circuit returns A5 (bit 0). The value is therefore the
// group carry whenever at least one X_i is 1; when all X_i are 0 the group
// propagates and carry8 takes the lower group's carry instead. Bit 0 of each
// vector is bit 5 of the pair. The structure is the document's. Purely
// combinational.
module carry4_second (
  input  logic [3:0] a,
  input  logic [3:0] x,
  output logic       cout
);

  logic m_hi, sel, m_mid, none_hi;

  always_comb begin
    m_hi    = x[3] ? a[3] : a[2];
    sel     = x[3] ? 1'b1 : x[2];
    m_mid   = sel ? m_hi : a[1];
    none_hi = ~(x[3] | x[2] | x[1]);
    cout    = none_hi ? a[0] : m_mid;
  end

endmodule
