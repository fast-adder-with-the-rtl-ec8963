// carry_gen4: carry generation circuit of one 4-bit block of the
// fault-tolerant fast adders.
//
// It computes the block's carry out (Cnew) from the block's A, B and carry in
// with the fast carry circuits of the plain adder. Blocks come in 8-bit pairs.
// The lower block of a pair (UPPER = 0) is carry4_first. The upper block
// (UPPER = 1) is carry4_second followed by the pair multiplexer, which passes
// the lower block's carry (this block's carry in) when all four X_i are 0.
// Splitting the pair circuit between the two blocks, and giving each instance
// its own A XNOR B gates so that redundant copies share no logic with each
// other or with the full adders, are this design's choices.
//
// inj flips the output; it is a verification aid and must be tied to 0 in
// use. Purely combinational.
module carry_gen4 #(
  parameter bit UPPER = 1'b0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  input  logic       inj,
  output logic       cout
);

  logic [3:0] x;
  logic       c_raw;

  assign x = ~(a ^ b);

  if (UPPER) begin : g_upper
    logic c_up;
    carry4_second u_c (
      .a   (a),
      .x   (x),
      .cout(c_up)
    );
    assign c_raw = ~(|x) ? cin : c_up;
  end else begin : g_lower
    carry4_first u_c (
      .a   (a),
      .x   (x),
      .cin (cin),
      .cout(c_raw)
    );
  end

  assign cout = c_raw ^ inj;

endmodule
