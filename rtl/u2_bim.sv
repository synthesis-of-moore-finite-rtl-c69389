// u2_bim: block of input memory functions of the Moore machine U2 (Gamma1 example).
//
// Produces the D inputs D1..D4 of the state register from the class code tau1 tau2
// and the logic conditions x1..x4. Because all states of one class of
// pseudoequivalent states leave along the same transitions, the next state depends
// on the class only, never on the in-class bits T1 T2, and the block needs one
// product term per row of the transition table of the classes (ten rows here,
// against 23 for a conventionally coded Moore machine). The transitions are
//   B1 (00): x1 -> a2 (0101), ~x1 x2 -> a3 (0110), ~x1 ~x2 -> a4 (0111)
//   B2 (01): x2 x3 -> a5 (1100), x2 ~x3 -> a6 (1101), ~x2 x4 -> a7 (1111),
//            ~x2 ~x4 -> a8 (1110)
//   B3 (11): x3 -> a9 (1011), ~x3 x2 -> a10 (1010), ~x3 ~x2 -> a8 (1110)
//   B4 (10): -> a1 (0000)
// D1 = tau2 is the minimised form given with the method; D2..D4 are minimised here
// from the same table. D1 is therefore a plain wire from tau2. Purely combinational.
module u2_bim
  import moore_u2_pkg::*;
(
  input  class_code_t tau,   // tau1 tau2
  input  cond_t       x,     // x1..x4
  output logic [1:RW] d      // D1..D4
);

  always_comb begin
    d[1] = tau[2];
    d[2] = ~tau[1] | (tau[2] & ~x[2] & ~x[3]);
    d[3] = (tau[1] & tau[2]) | (tau[2] & ~x[2]) | (~tau[1] & ~tau[2] & ~x[1]);
    d[4] = (~tau[1] & ~tau[2] & x[1])
         | (~tau[1] & ~tau[2] & ~x[2])
         | (~tau[1] &  tau[2] & x[2] & ~x[3])
         | (~tau[1] &  tau[2] & ~x[2] & x[4])
         | ( tau[1] &  tau[2] & x[3]);
  end

endmodule
