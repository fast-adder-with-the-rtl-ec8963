// tmr_carry_gen4: triplicated carry generation circuit with a compact voter.
//
// Three copies of carry_gen4 compute Cnew1..Cnew3. The voter needs one XNOR
// and one multiplexer: E_Cnew = Cnew2 XNOR Cnew3, and the output is Cnew2 when
// E_Cnew = 1 and Cnew1 otherwise. This equals the majority of the three, so
// any single faulty copy is outvoted. Structure as in the document. inj
// (bit k flips copy k+1) is a verification-only input; tie it to 0 in use.
// Purely combinational.
module tmr_carry_gen4
  import ft_adder_pkg::*;
#(
  parameter bit UPPER = 1'b0
) (
  input  logic [3:0]            a,
  input  logic [3:0]            b,
  input  logic                  cin,
  input  logic [TMR_COPIES-1:0] inj,
  output logic                  cout
);

  logic [TMR_COPIES-1:0] cnew;
  logic                  e_cnew;

  for (genvar k = 0; k < TMR_COPIES; k++) begin : g_copy
    carry_gen4 #(.UPPER(UPPER)) u_cg (
      .a   (a),
      .b   (b),
      .cin (cin),
      .inj (inj[k]),
      .cout(cnew[k])
    );
  end

  assign e_cnew = ~(cnew[1] ^ cnew[2]);
  assign cout   = e_cnew ? cnew[1] : cnew[0];

endmodule
