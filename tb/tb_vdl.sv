// tb_vdl: measures the delay from each rising clk edge to the rising edge of
// clk_del for all 64 control values. Expected: 9 * 667 ps of pre-delay plus
// (cntl + 1) * 30 ps, i.e. 6033 ps to 7923 ps, a tuning range of ~1.9 ns.
module tb_vdl;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;   // 13.56 MHz

  logic       clk = 1'b0;
  logic [5:0] cntl;
  logic       clk_del;
  int checks = 0, failures = 0;
  int cycles = 0;
  realtime t_clk, t_del;

  vdl dut (.clk(clk), .cntl(cntl), .clk_del(clk_del));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    cntl = '0;
    repeat (2) @(negedge clk);
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      cntl = 6'(c);
      @(posedge clk);
      t_clk = $realtime;
      @(posedge clk_del);
      t_del = $realtime;
      checks++;
      if (int'(t_del - t_clk) != 9 * 667 + (c + 1) * 30) begin
        failures++;
        $display("FAIL cntl=%0d delay=%0d ps", c, int'(t_del - t_clk));
      end
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
