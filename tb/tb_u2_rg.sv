// tb_u2_rg: test of the state register.
//
// Drives random D values and random start pulses for 400 clock cycles and checks
// after every rising edge that the register holds the previous D, or the code of
// a1 (all zeros) when start was high.
module tb_u2_rg;
  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         start;
  logic [1:W]   d;
  logic [1:W]   q;
  logic [1:W]   expected;
  int checks = 0, failures = 0, starts = 0;

  u2_rg #(.W(W)) dut (.clk(clk), .start(start), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b1;
    d     = 4'b1111;
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL start did not clear: q=%b", q); end
    for (int i = 0; i < 400; i++) begin
      start    = ($urandom_range(7) == 0);
      d        = W'($urandom);
      expected = start ? '0 : d;
      if (start) starts++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL cycle %0d start=%b d=%b q=%b expected %b", i, start, d, q, expected);
      end
    end
    if (starts == 0) begin failures++; $display("FAIL start never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
