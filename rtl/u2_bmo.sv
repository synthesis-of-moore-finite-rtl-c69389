// u2_bmo: block of microoperations BMO of the Moore machine U2 (Gamma1 example).
//
// Decodes the collection code z1 z2 z3 into the microoperations y1..y8. The codes
// were assigned to the seven collections so that each y is a short sum of products:
//   000 {}            001 {y3 y5 y6}     011 {y1 y3 y7}     100 {y2 y4 y6}
//   101 {y2 y4 y5}    110 {y1 y2 y6 y8}  111 {y1 y2 y7}     010 unused.
// The equations are the published minimised ones; with this coding y1 and y2 are plain
// wires from z2 and z1. Combinational.
module u2_bmo
  import moore_u2_pkg::*;
(
  input  cmo_code_t z,   // z1 z2 z3
  output mop_t      y    // y1..y8
);

  always_comb begin
    y[1] = z[2];
    y[2] = z[1];
    y[3] = ~z[1] & z[3];
    y[4] = z[1] & ~z[2];
    y[5] = ~z[2] & z[3];
    y[6] = (~z[1] & ~z[2] & z[3]) | (z[1] & ~z[3]);
    y[7] = z[2] & z[3];
    y[8] = z[2] & ~z[3];
  end

endmodule
