// st_block4: self-testing 4-bit block of the self-testing fast adder.
//
// Four self-testing full adders form a ripple chain from cin and report one
// Error each (e_fa, 0 = fault). The carry generation circuit computes the fast
// block carry Cnew in parallel; an XNOR compares Cnew with the ripple carry C4
// of the fourth full adder and gives e_cnew (0 = mismatch). Cnew, not the
// ripple C4, is the block's carry out, so the detection logic adds nothing to
// the carry path; that choice is this design's. UPPER selects the carry
// circuit of the upper block of an 8-bit pair (see carry_gen4).
//
// inj_fa and inj_cg are verification-only fault injection inputs; tie them
// to 0 in use. Purely combinational.
module st_block4
  import ft_adder_pkg::*;
#(
  parameter bit UPPER = 1'b0
) (
  input  logic          [3:0] a,
  input  logic          [3:0] b,
  input  logic                cin,
  input  st_inj_t       [3:0] inj_fa,
  input  logic                inj_cg,
  output logic          [3:0] s,
  output logic          [3:0] e_fa,
  output logic                cout,
  output logic                e_cnew
);

  logic [4:0] c;
  logic       cnew;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    st_fa u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .inj  (inj_fa[i]),
      .s    (s[i]),
      .cout (c[i+1]),
      .err_n(e_fa[i])
    );
  end

  carry_gen4 #(.UPPER(UPPER)) u_cg (
    .a   (a),
    .b   (b),
    .cin (cin),
    .inj (inj_cg),
    .cout(cnew)
  );

  assign e_cnew = ~(c[4] ^ cnew);
  assign cout   = cnew;

endmodule
