// tb_u2_bmo: test of the microoperation block.
//
// For each of the seven used collection codes, compares y1..y8 with the set of
// microoperations of that collection, written as lists of y indices.
module tb_u2_bmo;
  import moore_u2_pkg::*;

  cmo_code_t z;
  mop_t      y;
  int checks = 0, failures = 0;

  u2_bmo dut (.z(z), .y(y));

  function automatic mop_t set_of(int a, int b = 0, int c = 0, int e = 0);
    mop_t s = '0;
    if (a != 0) s[a] = 1'b1;
    if (b != 0) s[b] = 1'b1;
    if (c != 0) s[c] = 1'b1;
    if (e != 0) s[e] = 1'b1;
    return s;
  endfunction

  task automatic check(cmo_code_t code, mop_t expected, string name);
    z = code;
    #1;
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL %s z=%b y=%b expected %b", name, z, y, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(CY1, '0,                 "Y1");
    check(CY2, set_of(1, 2, 7),    "Y2");
    check(CY3, set_of(3, 5, 6),    "Y3");
    check(CY4, set_of(1, 3, 7),    "Y4");
    check(CY5, set_of(1, 2, 6, 8), "Y5");
    check(CY6, set_of(2, 4, 5),    "Y6");
    check(CY7, set_of(2, 4, 6),    "Y7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
