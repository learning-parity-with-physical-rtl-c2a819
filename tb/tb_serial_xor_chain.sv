// tb_serial_xor_chain: exhaustive check of the serial XOR stage.
// With the dummy bit enabled (default) the output must be the parity of the
// 8 inputs whatever d is; a second instance without the dummy bit is checked
// too. All 512 combinations of s and d are applied.
module tb_serial_xor_chain;
  timeunit 1ps; timeprecision 1ps;

  logic [7:0] s;
  logic       d;
  logic       p, p_nodummy;
  int checks = 0, failures = 0;

  serial_xor_chain dut (.s(s), .d(d), .p(p));
  serial_xor_chain #(.USE_DUMMY(1'b0)) dut_nd (.s(s), .d(d), .p(p_nodummy));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {d, s} = 9'(v);
      #1;
      checks += 2;
      if (p !== ^s) begin
        failures++;
        $display("FAIL s=%b d=%b p=%b", s, d, p);
      end
      if (p_nodummy !== ^s) begin
        failures++;
        $display("FAIL (no dummy) s=%b p=%b", s, p_nodummy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
