// tb_lppn_masked: the processor in its masked configuration (SHARES = 3),
// otherwise at full size. The secret k is split into three random shares;
// the first goes to the noisy inner product and the other two to k_mask.
// Checks: calibration locks after 7168 requests; afterwards p_out, compared
// with <x,k> for the whole secret, is wrong at a rate between 0.17 and 0.33;
// p_out also differs from the unmasked value <x,k_1> + noise in a way that
// depends on the other shares (it must agree with <x,k> far more often than
// with <x,k_1>).
module tb_lppn_masked;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;
  localparam int N = 512;

  logic           clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [N-1:0]   x = '0, k1 = '0, k2 = '0, k3 = '0, ksec;
  logic [2*N-1:0] k_mask;
  logic [127:0]   dummy_in = '0;
  logic [10:0]    vdd_mv = 11'd1200;
  logic           p_out, p_valid, locked, rst_v;
  logic [5:0]     ctrl_err;
  int checks = 0, failures = 0;
  int cycles = 0;

  assign k_mask = {k3, k2};
  assign ksec   = k1 ^ k2 ^ k3;

  lppn_processor #(.SHARES(3)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .x(x), .k(k1), .k_mask(k_mask),
    .dummy_in(dummy_in), .vdd_mv(vdd_mv), .p_out(p_out), .p_valid(p_valid),
    .locked(locked), .ctrl_err(ctrl_err), .rst_v(rst_v));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic ref_ip(logic [N-1:0] a, logic [N-1:0] b);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r ^= a[i] & b[i];
    return r;
  endfunction

  task automatic request();
    @(negedge clk);
    for (int w = 0; w < N / 32; w++) x[w*32 +: 32] = $urandom;
    dummy_in = {$urandom, $urandom, $urandom, $urandom};
    enable = 1'b1;
    @(negedge clk);
    enable = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int err_full = 0, err_share = 0, nvalid = 0;
    for (int w = 0; w < N / 32; w++) begin
      k1[w*32 +: 32] = $urandom;
      k2[w*32 +: 32] = $urandom;
      k3[w*32 +: 32] = $urandom;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 7 * 1024; i++) begin
      checks++;
      if (locked) begin
        failures++;
        $display("FAIL locked after %0d requests", i);
        break;
      end
      request();
    end
    checks++;
    if (!locked) begin
      failures++;
      $display("FAIL not locked after calibration");
    end
    for (int i = 0; i < 2048; i++) begin
      request();
      nvalid += int'(p_valid);
      err_full  += int'(p_out != ref_ip(x, ksec));
      err_share += int'(p_out != ref_ip(x, k1));
    end
    $display("masked: CNTL=%0d errors vs <x,k>=%0d, vs <x,k1>=%0d of 2048", ctrl_err, err_full, err_share);
    checks += 3;
    if (nvalid != 2048) failures++;
    if (err_full < 2048 * 17 / 100 || err_full > 2048 * 33 / 100) failures++;
    if (err_share < 800) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
