// tb_share_ip: exact share inner product. For random x and key shares, y
// must equal the parity of x & k_share loaded at the last enable edge; it
// must hold while enable is low and be cleared by rst_v.
module tb_share_ip;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 512;

  logic         clk = 1'b0, rst_n = 1'b0, enable = 1'b0, rst_v = 1'b0;
  logic [N-1:0] x, ks;
  logic         y;
  int checks = 0, failures = 0;
  int cycles = 0;

  share_ip dut (.clk(clk), .rst_n(rst_n), .enable(enable), .rst_v(rst_v), .x(x),
                .k_share(ks), .y(y));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic ref_ip(logic [N-1:0] a, logic [N-1:0] b);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r ^= a[i] & b[i];
    return r;
  endfunction

  initial begin
    logic expv;
    x = '0; ks = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int w = 0; w < N / 32; w++) begin
        x[w*32 +: 32] = $urandom;
        ks[w*32 +: 32] = $urandom;
      end
      if (t % 50 == 0) begin x = '0; x[t % N] = 1'b1; ks = '1; end
      expv = ref_ip(x, ks);
      enable = 1'b1;
      @(negedge clk);
      enable = 1'b0;
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL y=%b expected %b", y, expv);
      end
      // new inputs without enable: output holds
      x = ~x;
      @(negedge clk);
      checks++;
      if (y !== expv) failures++;
    end
    x = '1; ks = '1;
    @(negedge clk); enable = 1'b1; @(negedge clk); enable = 1'b0;
    checks++;
    if (y !== 1'b0) failures++;   // 512 ones: even parity
    x[0] = 1'b0;
    @(negedge clk); enable = 1'b1; @(negedge clk); enable = 1'b0;
    checks++;
    if (y !== 1'b1) failures++;
    @(negedge clk); rst_v = 1'b1; @(negedge clk); rst_v = 1'b0;
    checks++;
    if (y !== 1'b0 || dut.x_q != '0) failures++;
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
