// u2_rg: state register RG of the Moore machine U2.
//
// W D flip-flops hold the extended state code {tau, T}: the class code in the upper
// bits and the in-class code in the lower bits. On every rising clock edge the
// register takes the input memory functions D1..DW; while start is high it takes
// the all-zero code instead, which is the code of the initial state a1. The
// register and its start and clock inputs follow the structure of the machine; a
// synchronous, active-high start and the rising edge are this design's choices.
module u2_rg #(
  parameter int unsigned W = 4   // R1 + R2
) (
  input  logic         clk,
  input  logic         start,
  input  logic [1:W]   d,
  output logic [1:W]   q
);

  always_ff @(posedge clk) begin
    if (start) q <= '0;
    else       q <= d;
  end

endmodule
