// st_fa: self-testing full adder.
//
// The sum and carry are computed on independent paths so that one fault
// cannot corrupt both consistently: the sum path has its own A XNOR B gate
// followed by an XNOR with Cin, and the carry path is the multiplexer full
// adder (select A XNOR B, input 1 = A, input 0 = Cin). The carry path's
// A XNOR B gate also feeds fa_checker, which raises the fault (err_n = 0)
// when S and Cout are not a valid full-adder output pair for B and Cin.
//
// The inj input is this design's own verification aid, not part of the
// document's circuit: each bit flips one internal node (bit positions in
// ft_adder_pkg::st_inj_site_e). Tie it to 0 in use. Purely combinational.
module st_fa
  import ft_adder_pkg::*;
(
  input  logic    a,
  input  logic    b,
  input  logic    cin,
  input  st_inj_t inj,
  output logic    s,
  output logic    cout,
  output logic    err_n
);

  logic xs, xc;

  always_comb begin
    // sum path
    xs   = ~(a ^ b) ^ inj[INJ_XS];
    s    = ~(xs ^ cin) ^ inj[INJ_S];
    // carry path; its XNOR is shared with the checker
    xc   = ~(a ^ b) ^ inj[INJ_XC];
    cout = (xc ? a : cin) ^ inj[INJ_COUT];
  end

  fa_checker u_chk (
    .s    (s),
    .cout (cout),
    .xab  (xc),
    .b    (b),
    .cin  (cin),
    .err_n(err_n)
  );

endmodule
