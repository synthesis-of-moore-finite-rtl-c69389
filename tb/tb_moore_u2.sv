// tb_moore_u2: end-to-end test of the Moore machine U2 at its default sizes.
//
// A behavioural reference walks the flow chart Gamma1 state by state (states
// numbered 1..10, next state chosen by testing the conditions at each decision
// vertex, microoperations listed per operator vertex) and knows nothing of the
// class coding, the converter or the collection codes. State a10 is expected to
// issue y2 y4 y6, the collection the state-to-collection table assigns to it. The machine is driven with
// random conditions x1..x4 for many cycles, with occasional start pulses in the
// middle of a run; after every clock edge the test compares y1..y8 with the
// reference state's microoperations, {tau, T} with that state's extended code and
// z with the code of its microoperation collection.
//
// Coverage: every one of the 11 transitions of the chart (10 class-table rows plus
// the return from the final class to a1), every one of the 7 microoperation
// collections and a start taken in a state other than a1 must each happen at least
// once, or the test counts a failure.
module tb_moore_u2;
  import moore_u2_pkg::*;

  localparam int CYCLES = 3000;

  logic          clk = 1'b0;
  logic          start;
  cond_t         x;
  mop_t          y;
  class_code_t   tau;
  inclass_code_t t;
  cmo_code_t     z;

  int checks = 0, failures = 0;
  int ref_state;                 // 1..10 = a1..a10
  int trans_hits [11];           // per transition of the chart
  int state_hits [11];           // per state, index 1..10
  int mid_starts = 0;

  moore_u2 dut (.clk(clk), .start(start), .x(x), .y(y), .tau(tau), .t(t), .z(z));

  always #5 clk = ~clk;

  // Microoperations issued in each operator vertex of the chart
  function automatic mop_t mops(int s);
    mop_t m = '0;
    case (s)
      2:  begin m[1] = 1; m[2] = 1; m[7] = 1; end
      3:  begin m[3] = 1; m[5] = 1; m[6] = 1; end
      4:  begin m[1] = 1; m[3] = 1; m[7] = 1; end
      5:  begin m[1] = 1; m[2] = 1; m[6] = 1; m[8] = 1; end
      6:  begin m[1] = 1; m[2] = 1; m[7] = 1; end
      7:  begin m[2] = 1; m[4] = 1; m[5] = 1; end
      8:  begin m[2] = 1; m[4] = 1; m[6] = 1; end
      9:  begin m[1] = 1; m[3] = 1; m[7] = 1; end
      10: begin m[2] = 1; m[4] = 1; m[6] = 1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  // Extended code {tau1 tau2 T1 T2} of each state
  function automatic logic [1:RW] code_of(int s);
    case (s)
      1: return 4'b0000;  2: return 4'b0101;  3: return 4'b0110;  4: return 4'b0111;
      5: return 4'b1100;  6: return 4'b1101;  7: return 4'b1111;  8: return 4'b1110;
      9: return 4'b1011;  default: return 4'b1010;
    endcase
  endfunction

  // Collection code z1 z2 z3 of each state (observation port of the top)
  function automatic logic [1:R3] z_of(int s);
    case (s)
      1: return 3'b000;  2: return 3'b111;  3: return 3'b001;  4: return 3'b011;
      5: return 3'b110;  6: return 3'b111;  7: return 3'b101;  8: return 3'b100;
      9: return 3'b011;  default: return 3'b100;
    endcase
  endfunction

  // Next state from the chart; also returns the transition number 0..10
  function automatic int next_state(int s, cond_t xx, output int tr);
    if (s == 1) begin
      if (xx[1])      begin tr = 0; return 2; end
      else if (xx[2]) begin tr = 1; return 3; end
      else            begin tr = 2; return 4; end
    end else if (s >= 2 && s <= 4) begin
      if (xx[2]) begin
        if (xx[3]) begin tr = 3; return 5; end
        else       begin tr = 4; return 6; end
      end else begin
        if (xx[4]) begin tr = 5; return 7; end
        else       begin tr = 6; return 8; end
      end
    end else if (s >= 5 && s <= 8) begin
      if (xx[3])      begin tr = 7; return 9; end
      else if (xx[2]) begin tr = 8; return 10; end
      else            begin tr = 9; return 8; end
    end else begin
      tr = 10;
      return 1;
    end
  endfunction

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tr;
    start = 1'b1;
    x     = '0;
    @(posedge clk);
    #1;
    ref_state = 1;
    start = 1'b0;
    for (int i = 0; i < CYCLES; i++) begin
      // compare the present state
      checks++;
      if (y !== mops(ref_state) || {tau, t} !== code_of(ref_state) || z !== z_of(ref_state)) begin
        failures++;
        $display("FAIL cycle %0d a%0d: y=%b (expected %b) code=%b (expected %b) z=%b (expected %b)",
                 i, ref_state, y, mops(ref_state), {tau, t}, code_of(ref_state), z, z_of(ref_state));
      end
      state_hits[ref_state]++;
      // drive the next cycle
      x     = cond_t'($urandom);
      start = ($urandom_range(199) == 0);
      @(posedge clk);
      #1;
      if (start) begin
        if (ref_state != 1) mid_starts++;
        ref_state = 1;
      end else begin
        ref_state = next_state(ref_state, x, tr);
        trans_hits[tr]++;
      end
      start = 1'b0;
    end

    for (int h = 0; h < 11; h++) begin
      if (trans_hits[h] == 0) begin
        failures++;
        $display("FAIL transition %0d never taken", h + 1);
      end
    end
    // every collection: Y1 a1, Y2 a2/a6, Y3 a3, Y4 a4/a9, Y5 a5, Y6 a7, Y7 a8/a10
    if (state_hits[1] == 0)                    begin failures++; $display("FAIL Y1 never issued"); end
    if (state_hits[2] + state_hits[6] == 0)    begin failures++; $display("FAIL Y2 never issued"); end
    if (state_hits[3] == 0)                    begin failures++; $display("FAIL Y3 never issued"); end
    if (state_hits[4] + state_hits[9] == 0)    begin failures++; $display("FAIL Y4 never issued"); end
    if (state_hits[5] == 0)                    begin failures++; $display("FAIL Y5 never issued"); end
    if (state_hits[7] == 0)                    begin failures++; $display("FAIL Y6 never issued"); end
    if (state_hits[8] + state_hits[10] == 0)   begin failures++; $display("FAIL Y7 never issued"); end
    if (mid_starts == 0)                       begin failures++; $display("FAIL start never taken mid-run"); end

    $display("transitions taken (h=1..11):");
    for (int h = 0; h < 11; h++) $display("  h=%0d: %0d", h + 1, trans_hits[h]);
    $display("states visited: a1..a10 = %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d",
             state_hits[1], state_hits[2], state_hits[3], state_hits[4], state_hits[5],
             state_hits[6], state_hits[7], state_hits[8], state_hits[9], state_hits[10]);
    $display("start pulses taken outside a1: %0d", mid_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
