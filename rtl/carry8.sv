// carry8: fast fourth and eighth carries of an 8-bit pair.
//
// carry4_first gives C4 from the lower four bits and Cin. carry4_second gives
// the upper group's carry as if it did not propagate. A final multiplexer,
// selected by NOR(X8,X7,X6,X5), passes C4 when the whole upper group
// propagates and the carry4_second result otherwise. C8 thus takes at most
// four multiplexer delays from the inputs. Structure as in the document.
// Purely combinational.
module carry8 (
  input  logic [7:0] a,
  input  logic [7:0] x,
  input  logic       cin,
  output logic       c4,
  output logic       c8
);

  logic c_up;

  carry4_first u_lo (
    .a   (a[3:0]),
    .x   (x[3:0]),
    .cin (cin),
    .cout(c4)
  );

  carry4_second u_hi (
    .a   (a[7:4]),
    .x   (x[7:4]),
    .cout(c_up)
  );

  assign c8 = ~(|x[7:4]) ? c4 : c_up;

endmodule
