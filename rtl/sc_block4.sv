// sc_block4: self-correcting 4-bit block of the self-correcting fast adder.
//
// Four self-correcting full adders form a ripple chain of corrected carries
// and give the corrected sums. The block carry out is Cnew_correct from the
// triplicated, voted carry generation circuit, computed in parallel from the
// block inputs and cin; the ripple carry of the fourth adder is not used. UPPER
// selects the carry circuit of the upper block of an 8-bit pair. inj_fa and
// inj_cg are verification-only fault injection inputs; tie them to 0 in use.
// Purely combinational.
module sc_block4
  import ft_adder_pkg::*;
#(
  parameter bit UPPER = 1'b0
) (
  input  logic    [3:0]                  a,
  input  logic    [3:0]                  b,
  input  logic                           cin,
  input  st_inj_t [3:0][SC_COPIES-1:0]   inj_fa,
  input  logic    [TMR_COPIES-1:0]       inj_cg,
  output logic    [3:0]                  s,
  output logic                           cout
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    logic [SC_COPIES-1:0] e_unused;
    sc_fa u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .inj (inj_fa[i]),
      .s   (s[i]),
      .cout(c[i+1]),
      .e   (e_unused)
    );
  end

  tmr_carry_gen4 #(.UPPER(UPPER)) u_cg (
    .a   (a),
    .b   (b),
    .cin (cin),
    .inj (inj_cg),
    .cout(cout)
  );

endmodule
