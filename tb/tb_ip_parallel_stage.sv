// tb_ip_parallel_stage: checks the AND layer and six-layer XOR tree.
// Random 512-bit x and k (plus all-ones and single-bit corner cases); each of
// the 8 outputs must equal the parity of the 64 products it covers, computed
// here with a plain loop over the bits.
module tb_ip_parallel_stage;
  timeunit 1ps; timeprecision 1ps;

  localparam int N = 512;
  localparam int G = 64;

  logic [N-1:0] x, k;
  logic [7:0]   s;
  int checks = 0, failures = 0;

  ip_parallel_stage dut (.x(x), .k(k), .s(s));

  function automatic logic [7:0] model(logic [N-1:0] a, logic [N-1:0] b);
    logic [7:0] r = '0;
    for (int i = 0; i < N; i++) r[i / G] ^= a[i] & b[i];
    return r;
  endfunction

  task automatic check_one();
    #1;
    checks++;
    if (s !== model(x, k)) begin
      failures++;
      $display("FAIL s=%h expected %h", s, model(x, k));
    end
  endtask

  initial begin
    x = '1; k = '1; check_one();
    for (int b = 0; b < N; b += 37) begin
      x = '0; k = '0; x[b] = 1'b1; k[b] = 1'b1; check_one();
    end
    repeat (400) begin
      for (int w = 0; w < N / 32; w++) begin
        x[w*32 +: 32] = $urandom;
        k[w*32 +: 32] = $urandom;
      end
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
