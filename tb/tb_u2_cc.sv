// tb_u2_cc: test of the code converter.
//
// For each of the ten states a1..a10, applies its extended code and compares z with
// the code of the collection that state issues, taken from the state-to-collection
// table (not from the converter's equations).
module tb_u2_cc;
  import moore_u2_pkg::*;

  class_code_t   tau;
  inclass_code_t t;
  cmo_code_t     z;
  int checks = 0, failures = 0;

  logic [1:RW] codes [10] = '{A1, A2, A3, A4, A5, A6, A7, A8, A9, A10};
  cmo_code_t   coll  [10] = '{CY1, CY2, CY3, CY4, CY5, CY2, CY6, CY7, CY4, CY7};

  u2_cc dut (.tau(tau), .t(t), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 10; m++) begin
      {tau, t} = codes[m];
      #1;
      checks++;
      if (z !== coll[m]) begin
        failures++;
        $display("FAIL a%0d code=%b z=%b expected %b", m + 1, codes[m], z, coll[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
