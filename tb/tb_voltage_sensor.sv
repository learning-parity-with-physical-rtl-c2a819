// tb_voltage_sensor: complete sensor with a 13.56 MHz clock. enable is raised
// on the falling clock edge and sampled on the next rising edge; vt_sens must
// then read the number of thresholds (650, 750, ..., 1350 mV, within the
// delay model's rounding) below the supply, and must hold that value while
// enable stays low.
module tb_voltage_sensor;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;
  localparam int THR [8] = '{650, 752, 854, 955, 1046, 1147, 1249, 1350};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b0;
  logic [10:0] vdd_mv = 11'd1200;
  logic [7:0]  vt_therm;
  logic [3:0]  vt_sens;
  int checks = 0, failures = 0;
  int cycles = 0;

  voltage_sensor dut (.clk(clk), .rst_n(rst_n), .enable(enable), .vdd_mv(vdd_mv),
                      .vt_therm(vt_therm), .vt_sens(vt_sens));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (vt_sens !== 4'd0) failures++;
    for (int v = 610; v <= 1400; v += 25) begin
      automatic int expn = 0;
      for (int j = 0; j < 8; j++) expn += int'(v >= THR[j]);
      @(negedge clk);
      vdd_mv = 11'(v);
      enable = 1'b1;
      @(posedge clk);
      @(negedge clk);
      enable = 1'b0;
      checks++;
      if (int'(vt_sens) != expn) begin
        failures++;
        $display("FAIL vdd=%0d vt_sens=%0d expected %0d", v, vt_sens, expn);
      end
      // hold while no request
      vdd_mv = 11'd600;
      repeat (2) @(posedge clk);
      checks++;
      if (int'(vt_sens) != expn) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
