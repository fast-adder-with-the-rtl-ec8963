// tb_ft_model_pkg: reference models used by the testbenches of the
// fault-tolerant adders. They describe behaviour, not gates: a self-testing
// full adder with flipped internal nodes, the detector's validity rule, the
// two-level selection of the self-correcting full adder and a majority vote.
package tb_ft_model_pkg;
  import ft_adder_pkg::*;

  typedef struct packed {
    logic s;
    logic cout;
    logic err_n;
  } st_out_t;

  // A full-adder output pair is valid when S = Cout if A = B = Cin, and
  // S != Cout otherwise. a_seen is A as the detector sees it through its
  // A XNOR B input.
  function automatic logic valid_pair(logic s, logic cout, logic a_seen, logic b, logic cin);
    logic all_eq;
    all_eq = (a_seen == b) && (b == cin);
    return all_eq ? (s == cout) : (s != cout);
  endfunction

  function automatic st_out_t st_fa_model(logic a, logic b, logic cin, st_inj_t inj);
    st_out_t o;
    logic    eq_c, a_seen;
    o.s    = a ^ b ^ cin ^ inj[INJ_XS] ^ inj[INJ_S];
    eq_c   = (a == b) ^ inj[INJ_XC];
    o.cout = (eq_c ? a : cin) ^ inj[INJ_COUT];
    a_seen = eq_c ? b : ~b;
    o.err_n = valid_pair(o.s, o.cout, a_seen, b, cin);
    return o;
  endfunction

  // Outputs of a self-correcting full adder whose copies carry the given
  // injections: the first copy (in order main, first, second redundant)
  // whose checker passes, the second redundant copy if none of the first
  // two passes.
  function automatic st_out_t sc_fa_model(logic a, logic b, logic cin,
                                          st_inj_t [SC_COPIES-1:0] inj);
    st_out_t o0, o1, o2;
    o0 = st_fa_model(a, b, cin, inj[0]);
    o1 = st_fa_model(a, b, cin, inj[1]);
    o2 = st_fa_model(a, b, cin, inj[2]);
    if (o0.err_n) return o0;
    if (o1.err_n) return o1;
    return o2;
  endfunction

  function automatic logic maj3(logic x, logic y, logic z);
    return (x & y) | (y & z) | (x & z);
  endfunction

  // A fault that the detector always catches: a single flip of the sum
  // path XNOR, the sum or the carry.
  function automatic st_inj_t detectable_fault(int unsigned pick);
    st_inj_t f;
    f = '0;
    case (pick % 3)
      0: f[INJ_XS] = 1'b1;
      1: f[INJ_S] = 1'b1;
      default: f[INJ_COUT] = 1'b1;
    endcase
    return f;
  endfunction
endpackage
