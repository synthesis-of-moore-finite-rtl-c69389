// moore_u2: Moore machine U2 interpreting the flow chart Gamma1, with the state
// held as an extended code (class of pseudoequivalent states, then state inside
// the class) and a code converter between the register and the microoperations.
//
// Structure:  x --> BIM --D--> RG --tau--> BIM (feedback)
//                               RG --tau,T--> CC --z--> BMO --> y
// BIM sees only the class code tau, so its product terms equal the number of
// transitions of the equivalent Mealy machine. CC maps the extended code to a
// collection code z, and BMO decodes z into y1..y8.
//
// Timing: one state transition per rising clock edge. y, z, tau and t are
// combinational functions of the register, valid for the whole cycle in which the
// register holds a state (Moore outputs). start (synchronous, active high) puts the
// machine in the initial state a1 at the next edge. tau, t and z are brought out
// for observation only.
module moore_u2
  import moore_u2_pkg::*;
(
  input  logic          clk,
  input  logic          start,
  input  cond_t         x,     // x1..x4
  output mop_t          y,     // y1..y8
  output class_code_t   tau,   // class code of the present state
  output inclass_code_t t,     // in-class code of the present state
  output cmo_code_t     z      // collection code of the present state
);

  logic [1:RW] d;
  logic [1:RW] q;

  u2_bim u_bim (.tau(tau), .x(x), .d(d));

  u2_rg #(.W(RW)) u_rg (.clk(clk), .start(start), .d(d), .q(q));

  assign tau = q[1:R1];
  assign t   = q[R1+1:RW];

  u2_cc u_cc (.tau(tau), .t(t), .z(z));

  u2_bmo u_bmo (.z(z), .y(y));

endmodule
