// tb_p_glitch_model: checks the timing model of the inner-product net.
// After a launch edge p_out must still hold the old value just before
// 5800 ps, must equal the new value after 8200 ps, and inside the glitch
// window the fraction of wrong samples must follow (80 - i) / 160 for the
// 30 ps step i: it is measured at steps 8 (expected 0.45) and 56
// (expected 0.15) over 2000 launches each.
module tb_p_glitch_model;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;

  logic clk = 1'b0;
  logic launch = 1'b0;
  logic p_in = 1'b0;
  logic p_out;
  int checks = 0, failures = 0;
  int cycles = 0;

  p_glitch_model dut (.clk(clk), .launch(launch), .p_in(p_in), .p_out(p_out));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  // one launch with a new p_in value; returns p_out seen at time t_probe after the edge
  task automatic launch_and_probe(input logic newval, input int t_probe, output logic seen,
                                  output logic oldval);
    @(negedge clk);
    oldval = p_in;
    launch = 1'b1;
    @(posedge clk);
    p_in <= newval;
    #(t_probe);
    seen = p_out;
    @(negedge clk);
    launch = 1'b0;
  endtask

  initial begin
    logic seen, oldv;
    int wrong;
    // settle once
    launch_and_probe(1'b0, 9000, seen, oldv);
    // old value held before the glitch window
    for (int i = 0; i < 50; i++) begin
      launch_and_probe(~p_in, 5700, seen, oldv);
      checks++;
      if (seen !== oldv) failures++;
    end
    // settled after the window
    for (int i = 0; i < 50; i++) begin
      launch_and_probe(1'($urandom), 8300, seen, oldv);
      checks++;
      if (seen !== p_in) failures++;
    end
    // error rate early in the window (step 8: 5800+15+240 .. +30)
    wrong = 0;
    for (int i = 0; i < 2000; i++) begin
      launch_and_probe(1'($urandom), 5800 + 15 + 8 * 30 + 10, seen, oldv);
      wrong += int'(seen !== p_in);
    end
    checks++;
    if (wrong < 800 || wrong > 1000) begin
      failures++;
      $display("FAIL early-window errors %0d / 2000", wrong);
    end
    // error rate late in the window (step 56)
    wrong = 0;
    for (int i = 0; i < 2000; i++) begin
      launch_and_probe(1'($urandom), 5800 + 15 + 56 * 30 + 10, seen, oldv);
      wrong += int'(seen !== p_in);
    end
    checks++;
    if (wrong < 230 || wrong > 370) begin
      failures++;
      $display("FAIL late-window errors %0d / 2000", wrong);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
