// sc_fa: self-correcting full adder.
//
// Three self-testing full adders (the main one and two redundant copies) add
// the same inputs. Two levels of 2:1 multiplexers pick the outputs: the main
// adder while its Error e1 is 1, otherwise the first redundant adder while its
// e2 is 1, otherwise the second redundant adder. Any two of the three copies
// may be faulty (as long as their checkers see it) and the result stays
// correct. e carries the three Error signals (1 = no fault seen) for
// observation; e[2] takes no part in the selection.
//
// inj is a verification-only fault injection input, one st_fa vector per
// copy (index 0 = main); tie it to 0 in use. Purely combinational.
module sc_fa
  import ft_adder_pkg::*;
(
  input  logic                      a,
  input  logic                      b,
  input  logic                      cin,
  input  st_inj_t [SC_COPIES-1:0]   inj,
  output logic                      s,
  output logic                      cout,
  output logic    [SC_COPIES-1:0]   e
);

  logic [SC_COPIES-1:0] s_i, c_i;

  for (genvar k = 0; k < SC_COPIES; k++) begin : g_copy
    st_fa u_fa (
      .a    (a),
      .b    (b),
      .cin  (cin),
      .inj  (inj[k]),
      .s    (s_i[k]),
      .cout (c_i[k]),
      .err_n(e[k])
    );
  end

  always_comb begin
    s    = e[0] ? s_i[0] : (e[1] ? s_i[1] : s_i[2]);
    cout = e[0] ? c_i[0] : (e[1] ? c_i[1] : c_i[2]);
  end

endmodule
