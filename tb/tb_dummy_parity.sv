// tb_dummy_parity: checks the 128-bit, 7-layer dummy parity tree against the
// parity of its input computed bit by bit, for random and corner inputs.
module tb_dummy_parity;
  timeunit 1ps; timeprecision 1ps;

  logic [127:0] din;
  logic         d;
  int checks = 0, failures = 0;

  dummy_parity dut (.din(din), .d(d));

  function automatic logic model(logic [127:0] v);
    logic r = 1'b0;
    for (int i = 0; i < 128; i++) r ^= v[i];
    return r;
  endfunction

  initial begin
    for (int t = 0; t < 600; t++) begin
      if (t < 128) begin
        din = '0; din[t] = 1'b1;
      end else begin
        din = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      checks++;
      if (d !== model(din)) begin
        failures++;
        $display("FAIL din=%h d=%b", din, d);
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
