// sc_fast_adder: WIDTH-bit self-correcting fast adder.
//
// WIDTH/4 self-correcting 4-bit blocks, alternately the lower and upper block
// of an 8-bit pair, each taking the previous block's voted fast carry as carry
// in. Every sum bit survives faults in up to two of its three self-testing
// full adders when their checkers detect them, and every block carry survives
// one faulty copy of its carry circuit. WIDTH must be a multiple of 8; the
// default 16 matches the document's block diagram. inj_fa and inj_cg are
// verification-only fault injection inputs; tie them to 0 in use. Purely
// combinational.
module sc_fast_adder
  import ft_adder_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic    [WIDTH-1:0]                    a,
  input  logic    [WIDTH-1:0]                    b,
  input  logic                                   cin,
  input  st_inj_t [WIDTH-1:0][SC_COPIES-1:0]     inj_fa,
  input  logic    [WIDTH/4-1:0][TMR_COPIES-1:0]  inj_cg,
  output logic    [WIDTH-1:0]                    s,
  output logic                                   cout
);

  localparam int unsigned GROUPS = WIDTH / 4;

  initial assert (WIDTH % 8 == 0 && WIDTH > 0)
    else $error("sc_fast_adder: WIDTH must be a positive multiple of 8");

  logic [GROUPS:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < GROUPS; g++) begin : g_blk
    sc_block4 #(.UPPER(g % 2 == 1)) u_blk (
      .a     (a[4*g +: 4]),
      .b     (b[4*g +: 4]),
      .cin   (c[g]),
      .inj_fa(inj_fa[4*g +: 4]),
      .inj_cg(inj_cg[g]),
      .s     (s[4*g +: 4]),
      .cout  (c[g+1])
    );
  end

  assign cout = c[GROUPS];

endmodule
