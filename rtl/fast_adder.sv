// fast_adder: WIDTH-bit fast adder without fault tolerance.
//
// The operands are cut into 4-bit groups. Each group's sum comes from an rca4
// ripple adder, but the carry into each group comes from the fast carry
// circuits: one carry8 per 8-bit pair produces the pair's C4 and C8 from the
// X values of the rca4 adders, and the C8 of one pair is the carry in of the
// next pair. WIDTH must be a multiple of 8; the default, 16, is the size of
// the document's block diagram, and 8, 32 and 64 are the other sizes it
// evaluates. Chaining pairs beyond 16 bits is how this design generalises the
// diagram. Purely combinational.
module fast_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned GROUPS = WIDTH / 4;
  localparam int unsigned PAIRS  = WIDTH / 8;

  initial assert (WIDTH % 8 == 0 && WIDTH > 0)
    else $error("fast_adder: WIDTH must be a positive multiple of 8");

  logic [WIDTH-1:0] x;
  logic [GROUPS:0]  c;   // c[g] is the carry into group g

  assign c[0] = cin;

  for (genvar g = 0; g < GROUPS; g++) begin : g_rca
    logic c4_unused;
    rca4 u_rca (
      .a  (a[4*g +: 4]),
      .b  (b[4*g +: 4]),
      .cin(c[g]),
      .s  (s[4*g +: 4]),
      .x  (x[4*g +: 4]),
      .c4 (c4_unused)
    );
  end

  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    carry8 u_c8 (
      .a  (a[8*p +: 8]),
      .x  (x[8*p +: 8]),
      .cin(c[2*p]),
      .c4 (c[2*p+1]),
      .c8 (c[2*p+2])
    );
  end

  assign cout = c[GROUPS];

endmodule
