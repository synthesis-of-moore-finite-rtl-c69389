// tb_u2_bim: exhaustive test of the input memory function block.
//
// Applies all 4 class codes x all 16 combinations of x1..x4 and compares D1..D4
// with the code of the next state taken from the transition table of the classes,
// written here as a case over the class and nested condition tests, independent of
// the minimised equations in the block.
module tb_u2_bim;
  import moore_u2_pkg::*;

  class_code_t tau;
  cond_t       x;
  logic [1:RW] d;
  int checks = 0, failures = 0;

  u2_bim dut (.tau(tau), .x(x), .d(d));

  function automatic logic [1:RW] next_code(class_code_t c, cond_t xx);
    case (c)
      K_B1:    if (xx[1]) return A2; else if (xx[2]) return A3; else return A4;
      K_B2:    if (xx[2]) return xx[3] ? A5 : A6; else return xx[4] ? A7 : A8;
      K_B3:    if (xx[3]) return A9; else if (xx[2]) return A10; else return A8;
      default: return A1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int v = 0; v < 16; v++) begin
        tau = class_code_t'(c);
        x   = cond_t'(v);
        #1;
        checks++;
        if (d !== next_code(tau, x)) begin
          failures++;
          $display("FAIL tau=%b x=%b d=%b expected %b", tau, x, d, next_code(tau, x));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
