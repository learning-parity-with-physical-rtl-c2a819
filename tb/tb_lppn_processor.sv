// tb_lppn_processor: end-to-end test of the LPPN processor at its default
// size (512-bit secret and challenge, 1024-evaluation batches, target 256,
// 13.56 MHz clock).
//
// Sequence: reset; calibration with a fixed random secret and random
// challenges (7 * 1024 requests); authentication (2048 samples); a small
// supply change that must be tolerated; a supply drop that must trigger the
// fault detector and a new calibration at the lower supply; a return to the
// nominal supply that must trigger it again.
//
// Independent checks: the testbench computes every inner product itself and
// counts the errors of p_out in each calibration batch; the successive-
// approximation decision on each CNTL bit must agree with that count (bit
// kept exactly when the count exceeds 256), locked must rise after exactly
// 7168 requests, p_valid must come one cycle after each locked request edge,
// the locked error rate must lie between 0.17 and 0.33, and the reference
// flip-flop enable must stay off while locked. Each mechanism (batch, bit
// kept, bit cleared, lock, locked sample, dummy bit at 1, tolerated supply
// change, fault detection, recalibration) is counted and must occur.
module tb_lppn_processor;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;   // 13.56 MHz
  localparam int N = 512;

  logic         clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [N-1:0] x = '0, k = '0, k_mask = '0;
  logic [127:0] dummy_in = '0;
  logic [10:0]  vdd_mv = 11'd1200;
  logic         p_out, p_valid, locked, rst_v;
  logic [5:0]   ctrl_err;
  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_batch = 0, n_keep = 0, n_clear = 0, n_lock = 0, n_sample = 0;
  int n_dummy1 = 0, n_tolerated = 0, n_fault = 0, n_recal = 0;

  lppn_processor dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .x(x), .k(k), .k_mask(k_mask), .dummy_in(dummy_in),
    .vdd_mv(vdd_mv), .p_out(p_out), .p_valid(p_valid), .locked(locked),
    .ctrl_err(ctrl_err), .rst_v(rst_v));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  // the reference flip-flop is never enabled while locked
  always @(posedge clk) begin
    if (locked && $past(locked) && dut.en1_out) begin
      failures++;
      $display("FAIL reference flip-flop enabled while locked");
    end
  end

  function automatic logic ref_ip(logic [N-1:0] a, logic [N-1:0] b);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r ^= a[i] & b[i];
    return r;
  endfunction

  // one request with a random challenge: enable raised on a falling edge,
  // sampled on the next rising edge, dropped on the following falling edge.
  // err returns whether p_out differed from <x,k>; valid whether p_valid rose
  // one cycle after the request edge; fault whether rst_v was seen.
  task automatic request(output logic err, output logic valid, output logic fault);
    @(negedge clk);
    for (int w = 0; w < N / 32; w++) x[w*32 +: 32] = $urandom;
    dummy_in = {$urandom, $urandom, $urandom, $urandom};
    n_dummy1 += int'(^dummy_in);
    enable = 1'b1;
    @(posedge clk);
    @(negedge clk);
    enable = 1'b0;
    fault = rst_v;
    @(posedge clk);
    #1;
    valid = p_valid;
    err = (p_out != ref_ip(x, k));
  endtask

  // full calibration; checks the decisions against the measured error counts
  task automatic calibrate();
    logic err, valid, fault;
    int trial, errs;
    trial = 0;
    for (int b = 0; b < 7; b++) begin
      checks++;
      if (int'(ctrl_err) != trial) begin
        failures++;
        $display("FAIL batch %0d CNTL=%0d expected %0d", b, ctrl_err, trial);
      end
      errs = 0;
      for (int i = 0; i < 1024; i++) begin
        checks++;
        if (locked) begin
          failures++;
          $display("FAIL locked during calibration");
        end
        request(err, valid, fault);
        errs += int'(err);
        if (valid) begin
          failures++;
          $display("FAIL p_valid during calibration");
        end
      end
      n_batch++;
      $display("batch %0d CNTL=%0d errors=%0d / 1024", b, trial, errs);
      if (b > 0) begin
        if (errs > 256) n_keep++;
        else begin
          n_clear++;
          trial &= ~(1 << (6 - b));
        end
      end
      if (b < 6) trial |= 1 << (5 - b);
    end
    checks++;
    if (!locked || int'(ctrl_err) != trial) begin
      failures++;
      $display("FAIL after calibration locked=%b CNTL=%0d expected %0d", locked, ctrl_err, trial);
    end else begin
      n_lock++;
    end
  endtask

  task automatic authenticate(input int n);
    logic err, valid, fault;
    int errs = 0;
    for (int i = 0; i < n; i++) begin
      request(err, valid, fault);
      errs += int'(err);
      checks++;
      if (!valid) begin
        failures++;
        $display("FAIL no p_valid for a locked request");
      end else begin
        n_sample++;
      end
      @(posedge clk);
      #1 checks++;
      if (p_valid) failures++;   // single-cycle strobe
    end
    checks++;
    if (errs < n * 17 / 100 || errs > n * 33 / 100) begin
      failures++;
      $display("FAIL locked error rate %0d / %0d", errs, n);
    end
    $display("locked: CNTL=%0d errors=%0d / %0d", ctrl_err, errs, n);
  endtask

  initial begin
    logic err, valid, fault;
    for (int w = 0; w < N / 32; w++) k[w*32 +: 32] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    calibrate();
    authenticate(2048);

    // +50 mV: within one sensor step, tolerated
    vdd_mv = 11'd1250;
    request(err, valid, fault);
    checks++;
    if (fault || !valid || !locked) begin
      failures++;
      $display("FAIL small supply change not tolerated");
    end else n_tolerated++;

    // drop to 1000 mV: fault, unlock, CNTL cleared
    vdd_mv = 11'd1000;
    request(err, valid, fault);
    checks += 3;
    if (fault) n_fault++;
    else begin
      failures++;
      $display("FAIL supply drop not detected");
    end
    if (valid) failures++;
    if (locked || ctrl_err != 0) failures++;

    // recalibrate at the new supply, then work
    calibrate();
    n_recal++;
    authenticate(512);

    // back to nominal: two sensor steps away from the new reference
    vdd_mv = 11'd1200;
    request(err, valid, fault);
    checks++;
    if (fault && !locked) n_fault++;
    else begin
      failures++;
      $display("FAIL return to nominal supply not detected");
    end

    // every mechanism must have happened
    checks++;
    if (n_batch != 14 || n_keep == 0 || n_clear == 0 || n_lock != 2 || n_sample == 0 ||
        n_dummy1 == 0 || n_tolerated != 1 || n_fault != 2 || n_recal != 1) begin
      failures++;
      $display("FAIL mechanism missing");
    end
    $display("mechanisms: batches=%0d bit_kept=%0d bit_cleared=%0d locks=%0d samples=%0d dummy_one=%0d tolerated=%0d faults=%0d recalibrations=%0d",
             n_batch, n_keep, n_clear, n_lock, n_sample, n_dummy1, n_tolerated, n_fault, n_recal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
