// tb_vs_delay_line: raises enable and looks at the taps half a 13.56 MHz
// period later (36873 ps), for supplies from 610 mV to 1360 mV in 50 mV
// steps. Tap j must be set exactly when the supply reaches the tap's
// threshold 300 + pos[j] * 1050 / 93 mV, with pos = 31,40,49,58,66,75,84,93
// (about 650 + 100*j mV), and the taps must read as a thermometer code.
// A falling enable must clear all taps.
module tb_vs_delay_line;
  timeunit 1ps; timeprecision 1ps;

  localparam int T_REF = 36873;
  localparam int POS [8] = '{31, 40, 49, 58, 66, 75, 84, 93};

  logic        enable = 1'b0;
  logic [10:0] vdd_mv;
  logic [7:0]  b;
  int checks = 0, failures = 0;

  vs_delay_line dut (.enable(enable), .vdd_mv(vdd_mv), .b(b));

  initial begin
    for (int v = 610; v <= 1400; v += 50) begin
      logic [7:0] expv;
      vdd_mv = 11'(v);
      for (int j = 0; j < 8; j++) begin
        // reached when pos*K/(v-300) <= T_REF, K = 1050*T_REF/93 (integer)
        automatic longint kk = (64'(1050) * T_REF) / 93;
        expv[j] = (longint'(POS[j]) * kk / longint'(v - 300)) <= T_REF;
      end
      #1000;
      enable = 1'b1;
      #(T_REF);
      checks++;
      if (b !== expv) begin
        failures++;
        $display("FAIL vdd=%0d taps=%b expected %b", v, b, expv);
      end
      checks++;
      if (((b + 8'd1) & b) != 0) begin
        failures++;
        $display("FAIL vdd=%0d taps=%b not a thermometer code", v, b);
      end
      enable = 1'b0;
      #10;
      checks++;
      if (b != 0) failures++;
    end
    // nominal supply: 6 taps
    vdd_mv = 11'd1200; #1000; enable = 1'b1; #(T_REF);
    checks++;
    if (b !== 8'b0011_1111) begin
      failures++;
      $display("FAIL nominal taps=%b", b);
    end
    enable = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
