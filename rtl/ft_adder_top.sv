// ft_adder_top: the three fast adders side by side.
//
// pl_*: the plain fast adder (no fault tolerance), the base architecture.
// st_*: the self-testing fast adder, which adds and flags faulty full adders
//       and block carries (Error signals, 1 = no fault seen).
// sc_*: the self-correcting fast adder, which masks faults with redundant
//       self-testing full adders and triplicated carry circuits.
// Each adder has its own operands so that they can be used independently; the
// three are the adders the document compares. The *_inj_* inputs are
// verification-only fault injection inputs; tie them to 0 in use. All WIDTH
// bits wide (multiple of 8, default 16). Purely combinational.
module ft_adder_top
  import ft_adder_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  // plain fast adder
  input  logic    [WIDTH-1:0]                    pl_a,
  input  logic    [WIDTH-1:0]                    pl_b,
  input  logic                                   pl_cin,
  output logic    [WIDTH-1:0]                    pl_s,
  output logic                                   pl_cout,
  // self-testing fast adder
  input  logic    [WIDTH-1:0]                    st_a,
  input  logic    [WIDTH-1:0]                    st_b,
  input  logic                                   st_cin,
  input  st_inj_t [WIDTH-1:0]                    st_inj_fa,
  input  logic    [WIDTH/4-1:0]                  st_inj_cg,
  output logic    [WIDTH-1:0]                    st_s,
  output logic                                   st_cout,
  output logic    [WIDTH-1:0]                    st_e_fa,
  output logic    [WIDTH/4-1:0]                  st_e_cnew,
  output logic                                   st_fault,
  // self-correcting fast adder
  input  logic    [WIDTH-1:0]                    sc_a,
  input  logic    [WIDTH-1:0]                    sc_b,
  input  logic                                   sc_cin,
  input  st_inj_t [WIDTH-1:0][SC_COPIES-1:0]     sc_inj_fa,
  input  logic    [WIDTH/4-1:0][TMR_COPIES-1:0]  sc_inj_cg,
  output logic    [WIDTH-1:0]                    sc_s,
  output logic                                   sc_cout
);

  fast_adder #(.WIDTH(WIDTH)) u_plain (
    .a   (pl_a),
    .b   (pl_b),
    .cin (pl_cin),
    .s   (pl_s),
    .cout(pl_cout)
  );

  st_fast_adder #(.WIDTH(WIDTH)) u_st (
    .a     (st_a),
    .b     (st_b),
    .cin   (st_cin),
    .inj_fa(st_inj_fa),
    .inj_cg(st_inj_cg),
    .s     (st_s),
    .cout  (st_cout),
    .e_fa  (st_e_fa),
    .e_cnew(st_e_cnew),
    .fault (st_fault)
  );

  sc_fast_adder #(.WIDTH(WIDTH)) u_sc (
    .a     (sc_a),
    .b     (sc_b),
    .cin   (sc_cin),
    .inj_fa(sc_inj_fa),
    .inj_cg(sc_inj_cg),
    .s     (sc_s),
    .cout  (sc_cout)
  );

endmodule
