// tb_err_control_fsm: calibration and locked operation of the error
// controller, with short batches (BATCH_LEN = 16, TARGET_ERR = 4) so that
// many calibrations fit. The testbench plays the inner product: in every
// evaluation it reports an error (p_out != p_out_corr) for the first f(c)
// evaluations of the batch, where c is the current control word and
// f(c) > TARGET_ERR exactly when c < cstar. Successive approximation must
// then end on cstar - 1 (0 if cstar = 0) after 7 batches. Also checked:
// CNTL is 0 during the first batch and equals the trial value during the
// others, locked rises exactly after 7 * 16 evaluations, en1_out is never
// raised once locked, p_valid rises on the clock edge after each locked request edge,
// and rst_v drops locked and clears CNTL.
module tb_err_control_fsm;
  timeunit 1ps; timeprecision 1ps;

  localparam int BL = 16;
  localparam int TE = 4;

  logic       clk = 1'b0, rst_n = 1'b0, enable = 1'b0, rst_v = 1'b0;
  logic       p_out = 1'b0, p_out_corr = 1'b0;
  logic       en0_out, en1_out, locked, p_valid;
  logic [5:0] ctrl_err;
  int checks = 0, failures = 0;
  int cycles = 0;

  err_control_fsm #(.BATCH_LEN(BL), .TARGET_ERR(TE)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .rst_v(rst_v), .p_out(p_out),
    .p_out_corr(p_out_corr), .en0_out(en0_out), .en1_out(en1_out), .ctrl_err(ctrl_err),
    .locked(locked), .p_valid(p_valid));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  always @(posedge clk) begin
    if (locked && en1_out && $past(locked)) begin
      failures++;
      $display("FAIL en1_out raised while locked");
    end
  end

  function automatic int f_err(int c, int cstar);
    return (c < cstar) ? TE + 1 + (c % (BL - TE)) : TE - (c % 3);
  endfunction

  // one request; err selects whether p_out differs from p_out_corr
  task automatic request(input logic err);
    @(negedge clk);
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    p_out_corr = 1'($urandom);
    p_out = p_out_corr ^ err;
  endtask

  task automatic calibrate(input int cstar);
    int trial, expected;
    trial = 0;
    for (int b = 0; b < 7; b++) begin
      int fe;
      @(posedge clk);
      #1 checks++;
      if (int'(ctrl_err) != trial) begin
        failures++;
        $display("FAIL cstar=%0d batch %0d CNTL=%0d expected %0d", cstar, b, ctrl_err, trial);
      end
      fe = f_err(trial, cstar);
      for (int i = 0; i < BL; i++) begin
        checks++;
        if (locked) begin
          failures++;
          $display("FAIL locked early");
        end
        request(i < fe);
      end
      if (b > 0 && fe <= TE) trial &= ~(1 << (6 - b));
      if (b < 6) trial |= 1 << (5 - b);
    end
    @(negedge clk);
    expected = (cstar > 0) ? cstar - 1 : 0;
    checks += 2;
    if (!locked) begin
      failures++;
      $display("FAIL not locked after 7 batches");
    end
    if (int'(ctrl_err) != expected) begin
      failures++;
      $display("FAIL cstar=%0d final CNTL=%0d expected %0d", cstar, ctrl_err, expected);
    end
  endtask

  task automatic check_locked_requests(input int n);
    for (int i = 0; i < n; i++) begin
      int lat = 0;
      @(negedge clk);
      enable = 1'b1;
      @(posedge clk);
      @(negedge clk);
      enable = 1'b0;
      while (!p_valid && lat < 5) begin
        @(posedge clk);
        lat++;
        #1;
      end
      checks++;
      if (lat != 1) begin
        failures++;
        $display("FAIL p_valid latency %0d cycles", lat);
      end
      @(posedge clk);
      #1 checks++;
      if (p_valid) failures++;   // one-cycle pulse
    end
  endtask

  initial begin
    int cs [8] = '{0, 1, 34, 35, 63, 64, 17, 48};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      calibrate(cs[t]);
      check_locked_requests(4);
      // supply fault: back to calibration
      @(negedge clk);
      rst_v = 1'b1;
      @(negedge clk);
      rst_v = 1'b0;
      checks += 2;
      if (locked) failures++;
      if (ctrl_err != 0) failures++;
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
