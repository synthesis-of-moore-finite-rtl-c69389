// u2_cc: code converter CC of the Moore machine U2 (Gamma1 example).
//
// Turns the extended state code {tau1 tau2, T1 T2} into the code z1 z2 z3 of the
// microoperation collection the state issues. Because the state code no longer
// identifies the collection directly (states are coded by class first), this extra
// block restores the link; the class and in-class codes were chosen so that each z
// needs at most three product terms. Collections per state:
//   a1 000, a2 111, a3 001, a4 011, a5 110, a6 111, a7 101, a8 100, a9 011, a10 100.
// z1 and z3 are the published minimised equations. z2 is minimised here from the
// state-to-collection table, since the published z2 disagrees with that table for
// states a5, a7 and a9. State a10 is given collection {y2 y4 y6} (code 100) as in the
// state-to-collection table. Unused state codes are don't-cares. Combinational.
module u2_cc
  import moore_u2_pkg::*;
(
  input  class_code_t   tau,   // tau1 tau2
  input  inclass_code_t t,     // T1 T2
  output cmo_code_t     z      // z1 z2 z3
);

  always_comb begin
    z[1] = (tau[2] & ~t[1]) | (tau[1] & tau[2]) | (tau[1] & t[1] & ~t[2]);
    z[2] = (tau[2] & ~t[1]) | (~tau[1] & t[2]) | (~tau[2] & t[2]);
    z[3] = t[2] | (~tau[1] & tau[2]);
  end

endmodule
