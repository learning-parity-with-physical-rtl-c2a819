// tb_therm_encoder: exhaustive check of the thermometer encoder. Every 8-bit
// input must give the number of ones; proper thermometer codes (ones from
// the LSB up) must give their length.
module tb_therm_encoder;
  timeunit 1ps; timeprecision 1ps;

  logic [7:0] therm;
  logic [3:0] bin;
  int checks = 0, failures = 0;

  therm_encoder dut (.therm(therm), .bin(bin));

  initial begin
    for (int v = 0; v < 256; v++) begin
      automatic int ones = 0;
      therm = 8'(v);
      for (int i = 0; i < 8; i++) ones += int'(therm[i]);
      #1;
      checks++;
      if (int'(bin) != ones) begin
        failures++;
        $display("FAIL therm=%b bin=%0d", therm, bin);
      end
    end
    for (int n = 0; n <= 8; n++) begin
      therm = 8'((16'd1 << n) - 1);
      #1;
      checks++;
      if (int'(bin) != n) begin
        failures++;
        $display("FAIL thermometer length %0d gave %0d", n, bin);
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
