// Self-checking testbench for mcsa_group: all 512 combinations of the two
// 4-bit operands and the select carry, against a + b + cin.
module tb_mcsa_group;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  mcsa_group dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
