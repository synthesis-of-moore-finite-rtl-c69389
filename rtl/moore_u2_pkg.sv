// moore_u2_pkg: sizes, code types and code constants shared by the blocks of the
// Moore machine U2 that interprets the flow chart Gamma1.
//
// The state of U2 is held as an extended code K(a) = K(B)*C(a): R1 bits name the class
// of pseudoequivalent states B1..B4 the state belongs to (variables tau1, tau2) and R2
// bits name the state inside its class (variables T1, T2). The register therefore has
// R1+R2 = 4 bits. The microoperation collection of each state is carried between the
// code converter and the microoperation block as an R3 = 3 bit code z1 z2 z3.
//
// All vectors are numbered from 1 so that bit [1] is the variable with subscript 1
// (x[1] = x1, y[1] = y1, tau[1] = tau1). The sizes and every code below are those of
// the worked example Gamma1; only the bit numbering is this design's own choice.
package moore_u2_pkg;

  localparam int unsigned L  = 4;        // logic conditions x1..x4
  localparam int unsigned N  = 8;        // microoperations y1..y8
  localparam int unsigned R1 = 2;        // class code bits, ceil(log2 I), I = 4 classes
  localparam int unsigned R2 = 2;        // in-class code bits, ceil(log2 M0), M0 = 4
  localparam int unsigned R3 = 3;        // collection code bits, ceil(log2 Q), Q = 7
  localparam int unsigned RW = R1 + R2;  // width of the state register

  typedef logic [1:L]  cond_t;           // x1..x4
  typedef logic [1:N]  mop_t;            // y1..y8
  typedef logic [1:R1] class_code_t;     // tau1 tau2
  typedef logic [1:R2] inclass_code_t;   // T1 T2
  typedef logic [1:R3] cmo_code_t;       // z1 z2 z3

  // Class codes K(B_i)
  localparam class_code_t K_B1 = 2'b00;
  localparam class_code_t K_B2 = 2'b01;
  localparam class_code_t K_B3 = 2'b11;
  localparam class_code_t K_B4 = 2'b10;

  // Extended state codes {tau1, tau2, T1, T2}
  typedef enum logic [1:RW] {
    A1  = 4'b0000,
    A2  = 4'b0101,
    A3  = 4'b0110,
    A4  = 4'b0111,
    A5  = 4'b1100,
    A6  = 4'b1101,
    A7  = 4'b1111,
    A8  = 4'b1110,
    A9  = 4'b1011,
    A10 = 4'b1010
  } state_code_t;

  // Codes K(Y_q) of the microoperation collections; 010 is unused
  typedef enum logic [1:R3] {
    CY1 = 3'b000,   // {}
    CY3 = 3'b001,   // {y3 y5 y6}
    CY4 = 3'b011,   // {y1 y3 y7}
    CY7 = 3'b100,   // {y2 y4 y6}
    CY6 = 3'b101,   // {y2 y4 y5}
    CY5 = 3'b110,   // {y1 y2 y6 y8}
    CY2 = 3'b111    // {y1 y2 y7}
  } cmo_t;

endpackage
