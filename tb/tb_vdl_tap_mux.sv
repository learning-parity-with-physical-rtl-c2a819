// tb_vdl_tap_mux: checks the 64:1 tap selector. For every control value and
// every one-hot tap pattern the output must be high exactly when the hot tap
// is the selected one; random tap patterns are checked as well.
module tb_vdl_tap_mux;
  timeunit 1ps; timeprecision 1ps;

  logic [63:0] taps;
  logic [5:0]  cntl;
  logic        clk_del;
  int checks = 0, failures = 0;

  vdl_tap_mux dut (.taps(taps), .cntl(cntl), .clk_del(clk_del));

  initial begin
    for (int c = 0; c < 64; c++) begin
      cntl = 6'(c);
      for (int t = 0; t < 64; t++) begin
        taps = 64'd1 << t;
        #1;
        checks++;
        if (clk_del !== (t == c)) begin
          failures++;
          $display("FAIL cntl=%0d hot tap=%0d out=%b", c, t, clk_del);
        end
      end
      repeat (8) begin
        taps = {$urandom, $urandom};
        #1;
        checks++;
        if (clk_del !== taps[c]) failures++;
      end
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
