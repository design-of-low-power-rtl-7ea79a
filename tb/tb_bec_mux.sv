// Self-checking testbench for bec_mux: the 5-bit and 4-bit conditional
// incrementers on every input and both values of inc, against b or b + 1.
module tb_bec_mux;
  logic [4:0] b5, y5;
  logic [3:0] b4, y4;
  logic       inc;
  int checks = 0, failures = 0;

  bec_mux          dut5 (.b(b5), .inc(inc), .y(y5));
  bec_mux #(.W(4)) dut4 (.b(b4), .inc(inc), .y(y4));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {inc, b5} = 6'(i);
      b4 = b5[3:0];
      #1;
      checks++;
      if (y5 !== 5'(int'(b5) + int'(inc))) begin
        failures++;
        $display("FAIL 5-bit b=%b inc=%0b y=%b", b5, inc, y5);
      end
      checks++;
      if (y4 !== 4'(int'(b4) + int'(inc))) begin
        failures++;
        $display("FAIL 4-bit b=%b inc=%0b y=%b", b4, inc, y4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
