// tb_clk_skew_buf: clk_sk must follow every clk edge, rising and falling,
// after exactly 12 ns.
module tb_clk_skew_buf;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;

  logic clk = 1'b0;
  logic clk_sk;
  int checks = 0, failures = 0;
  int cycles = 0;
  realtime t0;

  clk_skew_buf dut (.clk(clk), .clk_sk(clk_sk));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (20) begin
      @(posedge clk); t0 = $realtime;
      @(posedge clk_sk);
      checks++;
      if (int'($realtime - t0) != 12000) failures++;
      @(negedge clk); t0 = $realtime;
      @(negedge clk_sk);
      checks++;
      if (int'($realtime - t0) != 12000) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
