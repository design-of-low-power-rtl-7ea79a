// Self-checking testbench for rca: the 4-bit adder with a carry-in
// (all 512 input combinations) and the carry-in-of-0 variant whose lowest
// cell is a half adder (all 256 operand pairs, with its unused cin port
// driven to both values to show it is ignored).
module tb_rca;
  logic [3:0] a, b, s, s0;
  logic       cin, cout, cout0;
  int checks = 0, failures = 0;

  rca                      dut  (.a(a), .b(b), .cin(cin), .s(s),  .cout(cout));
  rca #(.CIN_ZERO(1'b1))   dut0 (.a(a), .b(b), .cin(cin), .s(s0), .cout(cout0));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> %0b_%h", a, b, cin, cout, s);
      end
      checks++;
      if ({cout0, s0} !== 5'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL (cin=0 adder) a=%h b=%h -> %0b_%h", a, b, cout0, s0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
