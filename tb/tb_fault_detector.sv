// tb_fault_detector: the reference register must take vt_sens when locked
// rises; afterwards rst_v must be raised exactly in measurement cycles in
// which |vt_sens - reference| > 1, never while unlocked and never without a
// measurement. All sensor values 0..8 are tried around references 0..8.
module tb_fault_detector;
  timeunit 1ps; timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b0, locked = 1'b0, meas = 1'b0;
  logic [3:0] vt_sens = '0;
  logic       rst_v;
  int checks = 0, failures = 0;
  int cycles = 0;

  fault_detector dut (.clk(clk), .rst_n(rst_n), .locked(locked), .meas(meas),
                      .vt_sens(vt_sens), .rst_v(rst_v));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r <= 8; r++) begin
      // unlocked: never a fault
      @(negedge clk);
      locked = 1'b0; meas = 1'b1; vt_sens = 4'((r + 5) % 9);
      #1 checks++;
      if (rst_v !== 1'b0) failures++;
      // calibration ends with reference r
      @(negedge clk);
      vt_sens = 4'(r); meas = 1'b0;
      @(negedge clk);
      locked = 1'b1;
      repeat (2) @(negedge clk);
      for (int v = 0; v <= 8; v++) begin
        automatic int dst = (v > r) ? v - r : r - v;
        vt_sens = 4'(v);
        meas = 1'b0;
        #1 checks++;
        if (rst_v !== 1'b0) failures++;
        meas = 1'b1;
        #1 checks++;
        if (rst_v !== (dst > 1)) begin
          failures++;
          $display("FAIL ref=%0d v=%0d rst_v=%b", r, v, rst_v);
        end
        @(negedge clk);
      end
      meas = 1'b0;
      locked = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
