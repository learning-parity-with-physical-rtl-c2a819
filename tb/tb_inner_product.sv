// tb_inner_product: the inner-product block with its two sampling clocks
// generated here (clk_sk 12 ns after clk, clk_del programmable). Checks:
//  * with clk_del at 9 ns (after the net has settled) P_out and P_out^corr
//    both equal <x,k> computed independently, with and without dummy input;
//  * with clk_del at 3 ns (before the parallel stage has settled) P_out
//    still holds the previous inner product while P_out^corr is correct;
//  * the flip-flops keep their value while their enables are low;
//  * rst_v clears the input registers (result 0 afterwards).
module tb_inner_product;
  timeunit 1ps; timeprecision 1ps;

  localparam int PERIOD = 73746;
  localparam int N = 512;

  logic           clk = 1'b0, clk_del, clk_sk, rst_n = 1'b0;
  logic           enable = 1'b0, rst_v = 1'b0, en0 = 1'b0, en1 = 1'b0;
  logic [N-1:0]   x, k;
  logic [127:0]   dummy_in;
  logic           p_out, p_out_corr;
  int             del_ps = 9000;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) cycles++;
  assign #(12000) clk_sk = clk;
  always @(clk) begin
    automatic logic v = clk;
    clk_del <= #(del_ps) v;
  end

  inner_product dut (
    .clk(clk), .clk_del(clk_del), .clk_sk(clk_sk), .rst_n(rst_n), .enable(enable),
    .rst_v(rst_v), .x(x), .k(k), .dummy_in(dummy_in), .en0_out(en0), .en1_out(en1),
    .p_out(p_out), .p_out_corr(p_out_corr));

  function automatic logic ref_ip(logic [N-1:0] a, logic [N-1:0] b);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r ^= a[i] & b[i];
    return r;
  endfunction

  task automatic randomize_inputs();
    for (int w = 0; w < N / 32; w++) begin
      x[w*32 +: 32] = $urandom;
      k[w*32 +: 32] = $urandom;
    end
    dummy_in = {$urandom, $urandom, $urandom, $urandom};
  endtask

  // one evaluation: request on a falling edge, enables during the next cycle
  task automatic evaluate();
    @(negedge clk);
    enable = 1'b1;
    @(posedge clk);
    enable <= 1'b0;
    en0 <= 1'b1;
    en1 <= 1'b1;
    @(posedge clk);
    en0 <= 1'b0;
    en1 <= 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic prev;
    x = '0; k = '0; dummy_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // late sampling: both outputs correct
    for (int i = 0; i < 200; i++) begin
      randomize_inputs();
      evaluate();
      checks += 2;
      if (p_out !== ref_ip(x, k) || p_out_corr !== ref_ip(x, k)) begin
        failures++;
        $display("FAIL late sampling p_out=%b corr=%b ref=%b", p_out, p_out_corr, ref_ip(x, k));
      end
    end
    // early sampling: P_out sees the previous result
    del_ps = 3000;
    repeat (2) @(posedge clk);
    prev = ref_ip(x, k);
    for (int i = 0; i < 200; i++) begin
      randomize_inputs();
      evaluate();
      checks += 2;
      if (p_out !== prev) begin
        failures++;
        $display("FAIL early sampling p_out=%b previous=%b", p_out, prev);
      end
      if (p_out_corr !== ref_ip(x, k)) failures++;
      prev = ref_ip(x, k);
    end
    // enables low: outputs hold
    del_ps = 9000;
    repeat (2) @(posedge clk);
    randomize_inputs();
    evaluate();
    prev = p_out;
    for (int i = 0; i < 20; i++) begin
      randomize_inputs();
      if (ref_ip(x, k) != prev) break;
    end
    @(negedge clk); enable = 1'b1; @(posedge clk); enable <= 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (p_out !== prev) failures++;
    // rst_v clears the registered inputs
    @(negedge clk); rst_v = 1'b1; @(negedge clk); rst_v = 1'b0;
    @(posedge clk); en0 <= 1'b1; en1 <= 1'b1; @(posedge clk); en0 <= 1'b0; en1 <= 1'b0;
    checks += 2;
    if (p_out !== 1'b0 || p_out_corr !== 1'b0) failures++;
    checks++;
    if (dut.x_q != '0 || dut.k_q != '0) failures++;
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
