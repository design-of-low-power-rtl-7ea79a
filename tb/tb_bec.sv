// Self-checking testbench for bec: the 5-bit converter on all 32 inputs
// against b + 1 modulo 32, and the 4-bit converter against the 4-bit
// binary to excess-1 truth table, written out below (0000 -> 0001, ...,
// 1110 -> 1111, 1111 -> 0000).
module tb_bec;
  logic [4:0] b5, x5;
  logic [3:0] b4, x4;
  int checks = 0, failures = 0;

  localparam logic [3:0] TABLE4 [16] = '{
    4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1000,
    4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111, 4'b0000
  };

  bec          dut5 (.b(b5), .x(x5));
  bec #(.W(4)) dut4 (.b(b4), .x(x4));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      b5 = 5'(i);
      #1;
      checks++;
      if (x5 !== 5'((i + 1) % 32)) begin
        failures++;
        $display("FAIL 5-bit b=%b x=%b", b5, x5);
      end
    end
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (x4 !== TABLE4[i]) begin
        failures++;
        $display("FAIL 4-bit b=%b x=%b expected %b", b4, x4, TABLE4[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
